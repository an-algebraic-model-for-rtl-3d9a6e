// square_shifter: cyclic shifter of group G3, an array of shift cells,
// square (sqrt(N) x sqrt(N)) by default and ROWS x (N/ROWS) in general.
//
// Word bit k (0-based) is stored at row k mod ROWS, column k div ROWS:
// column 0 holds bits 0..ROWS-1 from the bottom row up, column 1 the next
// ROWS bits, and so on. A cell can take the value of the cell below it (up
// shift) or of the cell to its left (right shift). In an up shift the top
// cell of each column feeds the bottom cell of the next column, and the top
// of the last column feeds the bottom of the first, so an up shift rotates
// the word by 1. A right shift moves every column one place right, the last
// column wrapping to the first, and rotates the word by ROWS.
// The amount c splits into c_up = c mod ROWS (its low log2 ROWS bits) and
// c_right = c div ROWS (the high bits). The array first shifts right c_right
// times, then up c_up times. For the square array this is at most
// 2(sqrt(N) - 1) steps with area proportional to N.
// ROWS sets the aspect ratio: the up-shift generator is split into N/ROWS
// column cycles of length ROWS and the right-shift generator into ROWS row
// cycles of length N/ROWS. The default is the square array; other ratios are
// a parameter of this design.
//
// Interface as linear_shifter: start (when idle) loads din and amt; done
// rises for one cycle c_right + c_up + 1 clock edges after the edge that
// takes start, with dout holding din rotated toward the MSB by amt.
// N and ROWS must be powers of two, with 2 <= ROWS <= N/2.
// The assertion property uses the reset synchronously, which is why lint
// reports rst_n as used both ways; the flip-flops reset asynchronously.
module square_shifter #(
  parameter int N  = 64,
  parameter int AW   = $clog2(N),
  parameter int ROWS = 1 << ($clog2(N) / 2)
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
  localparam int UW   = $clog2(ROWS);  // bits of c_up
  localparam int RW   = AW - UW;       // bits of c_right
  localparam int COLS = N / ROWS;

  if ((1 << AW) != N || (1 << UW) != ROWS || UW < 1 || RW < 1) begin : g_bad_size
    $error("square_shifter: N and ROWS must be powers of two, 2 <= ROWS <= N/2");
  end

  logic [UW-1:0] cnt_up;
  logic [RW-1:0] cnt_right;
  logic          load, step_right, step_up;

  assign load       = start && !busy;
  assign step_right = busy && (cnt_right != '0);
  assign step_up    = busy && (cnt_right == '0) && (cnt_up != '0);

  for (genvar col = 0; col < COLS; col++) begin : g_col
    for (genvar row = 0; row < ROWS; row++) begin : g_row
      localparam int PREV   = (col + COLS - 1) % COLS;              // column to the left
      localparam int K      = row + col * ROWS;                     // this cell
      localparam int K_LEFT = row + PREV * ROWS;                    // left neighbour
      localparam int K_DOWN = (row > 0) ? K - 1                     // cell below, or
                                        : (ROWS - 1) + PREV * ROWS; // top of previous column
      shift_cell u_cell (
        .clk, .rst_n,
        .load   (load),
        .ld_val (din[K]),
        .shift_a(step_right),
        .in_a   (dout[K_LEFT]),
        .shift_b(step_up),
        .in_b   (dout[K_DOWN]),
        .q      (dout[K])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      cnt_up    <= '0;
      cnt_right <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        busy      <= 1'b1;
        cnt_up    <= amt[UW-1:0];
        cnt_right <= amt[AW-1:UW];
      end else if (step_right) begin
        cnt_right <= cnt_right - 1'b1;
      end else if (step_up) begin
        cnt_up <= cnt_up - 1'b1;
      end else if (busy) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(step_right && step_up));
endmodule
