// kcopy_shifter: cyclic shifter when every input bit is available K times
// (groups G4, G5 and G6: the linear, barrel and square shifters with K copies
// of the input).
//
// Copy m of the input word (m = 0..K-1) is wired in already rotated by
// m*N/K positions, so the K copies together make every input bit available
// at K places. The amount c = q*(N/K) + r is split into the copy number q
// (the high log2 K bits) and the residual r < N/K (the low bits). A K-way
// multiplexer picks copy q, and a base shifter of kind KIND rotates it by r:
//   SHIFT_LINEAR: a ring of shift cells, at most N/K - 1 steps (G4);
//   SHIFT_BARREL: a barrel shifter of log2(N/K) stages only (G5);
//   SHIFT_SQUARE: the square array, needing at most (N/K)/sqrt(N) right
//                 steps and sqrt(N) - 1 up steps (G6).
// The pre-rotated copies and this split of the amount are this design's
// reading of "each input bit is repeated k times".
//
// Interface as linear_shifter: start (when idle) takes din and amt; done
// rises for one cycle when dout holds din rotated toward the MSB by amt.
// Clock edges from the edge that takes start to the one that raises done:
// r + 1 (linear), (r div sqrt N) + (r mod sqrt N) + 1 (square), and 0 for
// the barrel kind, whose registered result and done come on the start edge
// itself.
// N/K must be a power of two (N an even power of two for SHIFT_SQUARE).
module kcopy_shifter
  import modgen_pkg::*;
#(
  parameter int            N    = 64,
  parameter int            K    = 4,
  parameter shifter_kind_e KIND = SHIFT_LINEAR,
  parameter int            AW   = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  din,
  input  logic [AW-1:0] amt,
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  dout
);
  localparam int SEG = N / K;            // span covered by one copy
  localparam int RW  = $clog2(SEG);      // residual amount bits
  localparam int QW  = (AW > RW) ? AW - RW : 1;

  if (SEG * K != N || (1 << RW) != SEG) begin : g_bad_size
    $error("kcopy_shifter: N/K must be a power of two");
  end

  // K copies of the input, copy m rotated by m*SEG
  logic [N-1:0] copies [K];
  for (genvar m = 0; m < K; m++) begin : g_copy
    for (genvar i = 0; i < N; i++) begin : g_bit
      assign copies[m][(i + m * SEG) % N] = din[i];
    end
  end

  logic [QW-1:0] q;
  logic [N-1:0]  picked;
  assign q      = QW'(amt >> RW);
  assign picked = copies[q];

  if (KIND == SHIFT_BARREL) begin : g_barrel
    localparam int ST = (RW > 0) ? RW : 1;
    logic [N-1:0] rot;
    logic [ST-1:0] resid_b;
    assign resid_b = ST'(amt & AW'(SEG - 1));
    barrel_shifter #(.N(N), .STAGES(ST)) u_base (
      .din (picked),
      .amt (resid_b),
      .dout(rot)
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dout <= '0;
        done <= 1'b0;
      end else begin
        done <= start;
        if (start) dout <= rot;
      end
    end
    assign busy = 1'b0;
  end else if (KIND == SHIFT_SQUARE) begin : g_square
    logic [AW-1:0] resid;   // amt mod SEG
    assign resid = amt & AW'(SEG - 1);
    square_shifter #(.N(N)) u_base (
      .clk, .rst_n, .start,
      .din (picked),
      .amt (resid),
      .busy, .done, .dout
    );
  end else begin : g_linear
    logic [AW-1:0] resid;   // amt mod SEG
    assign resid = amt & AW'(SEG - 1);
    linear_shifter #(.N(N)) u_base (
      .clk, .rst_n, .start,
      .din (picked),
      .amt (resid),
      .busy, .done, .dout
    );
  end
endmodule
