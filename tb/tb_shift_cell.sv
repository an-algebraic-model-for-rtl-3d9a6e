// tb_shift_cell: drives the leaf cell through load, hold, shift from in_a,
// shift from in_b and the priority between them, with random values, and
// compares q with a model of the cell updated on the same clock edges.
module tb_shift_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, ld_val, shift_a, in_a, shift_b, in_b, q;
  logic exp_q;
  int checks = 0, failures = 0;

  shift_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    {load, ld_val, shift_a, in_a, shift_b, in_b} = '0;
    exp_q = 1'b0;
    #12 rst_n = 1'b1;
    checks++;
    if (q !== 1'b0) failures++;
    repeat (400) begin
      @(negedge clk);
      {load, ld_val, shift_a, in_a, shift_b, in_b} = 6'($urandom);
      if (load)         exp_q = ld_val;
      else if (shift_a) exp_q = in_a;
      else if (shift_b) exp_q = in_b;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL ctl=%b q=%b exp=%b", {load, ld_val, shift_a, in_a, shift_b, in_b}, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
