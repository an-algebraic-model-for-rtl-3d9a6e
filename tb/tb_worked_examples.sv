// tb_worked_examples: the small worked examples of the design-space model.
//  - The 6-bit adder (G_4,P_4)(3) o (G_2,P_2)(1) (monoid_adder defaults) on
//    all operand pairs.
//  - The permutation (1 3)(2 4) on a 4-bit word (x1 x2 x3 x4) gives
//    (x3 x4 x1 x2): a 4-bit barrel shifter rotating by 2, all 16 words.
//  - The shifting group of n = 16 is generated by (1 2 ... n): a 16-bit
//    linear ring rotated c times and a 4 x 4 square array rotated by c must
//    agree with a 16-bit barrel shifter for every c and random words.
module tb_worked_examples;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [5:0] a6, b6, s6;
  logic       c6;
  logic [3:0] w4, r4;
  logic [15:0] din = '0, bar16, lin16, sq16;
  logic [3:0]  amt = '0;
  logic        start = 1'b0;
  logic        lin_busy, lin_done, sq_busy, sq_done;
  int checks = 0, failures = 0;

  monoid_adder u_add6 (.a(a6), .b(b6), .sum(s6), .cout(c6));
  barrel_shifter #(.N(4))  u_bar4  (.din(w4), .amt(2'd2), .dout(r4));
  barrel_shifter #(.N(16)) u_bar16 (.din, .amt, .dout(bar16));
  linear_shifter #(.N(16)) u_lin16 (.clk, .rst_n, .start, .din, .amt,
                                    .busy(lin_busy), .done(lin_done), .dout(lin16));
  square_shifter #(.N(16)) u_sq16  (.clk, .rst_n, .start, .din, .amt,
                                    .busy(sq_busy), .done(sq_done), .dout(sq16));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a6, b6} = v[11:0]; #1;
      chk({c6, s6} == 7'(a6) + 7'(b6), "6-bit adder");
    end
    for (int v = 0; v < 16; v++) begin
      w4 = v[3:0]; #1;
      // position 1 is bit 0: result (x3 x4 x1 x2)
      chk(r4 == {w4[1], w4[0], w4[3], w4[2]}, "(1 3)(2 4)");
    end
    #20 rst_n = 1'b1;
    for (int c = 0; c < 16; c++) begin
      bit got_lin, got_sq;
      @(negedge clk);
      din = 16'($urandom); amt = 4'(c); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      got_lin = 1'b0; got_sq = 1'b0;
      for (int t = 0; t < 40 && !(got_lin && got_sq); t++) begin
        if (lin_done && !got_lin) begin got_lin = 1'b1; chk(lin16 == bar16, "linear vs barrel"); end
        if (sq_done && !got_sq)   begin got_sq = 1'b1;  chk(sq16 == bar16, "square vs barrel"); end
        @(negedge clk);
      end
      chk(got_lin && got_sq, "both sequential shifters finished");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
