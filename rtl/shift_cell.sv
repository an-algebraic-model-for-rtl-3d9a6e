// shift_cell: the shift-store leaf cell shared by every shifter structure.
//
// One flip-flop with an input multiplexer. Each clock edge it either loads
// a new bit (load), takes the value of one of two neighbours (shift_a selects
// in_a, shift_b selects in_b), or keeps its value. A ring of these cells with
// only in_a used is a linear shift register; the square array uses both
// inputs (the neighbour below and the neighbour to the left). load has
// priority over shift_a, which has priority over shift_b. Asynchronous
// active-low reset to 0. Output q is the stored bit.
module shift_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic ld_val,
  input  logic shift_a,
  input  logic in_a,
  input  logic shift_b,
  input  logic in_b,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= 1'b0;
    else if (load)    q <= ld_val;
    else if (shift_a) q <= in_a;
    else if (shift_b) q <= in_b;
  end
endmodule
