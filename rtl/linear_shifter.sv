// linear_shifter: cyclic shifter of group G1, generated by the single
// permutation (1 2 ... n).
//
// N shift cells form a ring; on a shift step every cell takes the value of
// its lower neighbour and the top cell feeds the bottom one, so the word
// rotates by one position (bit i moves to bit (i+1) mod N). A rotation by c
// is c such steps, taking time proportional to N in the worst case with area
// proportional to N.
//
// Interface: when idle, start loads din and the amount amt (0..N-1). The
// shifter then steps once per clock while its counter is non-zero, and
// raises done for one cycle when the rotation is complete; dout then holds
// din rotated toward the MSB by amt until the next start. done follows start
// by exactly amt+1 clock edges. busy is high from the edge after start until
// done. start is ignored while busy. The start/busy/done handshake and the
// reset behaviour are this design's choices.
module linear_shifter #(
  parameter int N  = 64,
  parameter int AW = $clog2(N)
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
  logic [AW-1:0] count;
  logic          load, step;

  assign load = start && !busy;
  assign step = busy && (count != '0);

  for (genvar i = 0; i < N; i++) begin : g_cell
    shift_cell u_cell (
      .clk, .rst_n,
      .load   (load),
      .ld_val (din[i]),
      .shift_a(step),
      .in_a   (dout[(i + N - 1) % N]),
      .shift_b(1'b0),
      .in_b   (1'b0),
      .q      (dout[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      count <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        busy  <= 1'b1;
        count <= amt;
      end else if (step) begin
        count <= count - 1'b1;
      end else if (busy) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
