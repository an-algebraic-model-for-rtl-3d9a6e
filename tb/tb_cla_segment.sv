// tb_cla_segment: exhaustive check of a 4-bit segment with the abutting ("o")
// interface and with the carry-select ("*") interface, and a random check of
// 5-bit segments: sum and carry-out must equal a + b + cin.
module tb_cla_segment;
  logic [3:0] a, b, s_abut, s_sel;
  logic       cin, c_abut, c_sel;
  logic [4:0] a5, b5, s5_abut, s5_sel;
  logic       c5_abut, c5_sel;
  int checks = 0, failures = 0;

  cla_segment                         dut_abut (.a, .b, .cin, .sum(s_abut), .cout(c_abut));
  cla_segment #(.W(4), .SELECT(1'b1)) dut_sel  (.a, .b, .cin, .sum(s_sel),  .cout(c_sel));
  cla_segment #(.W(5), .SELECT(1'b0)) dut5a (.a(a5), .b(b5), .cin, .sum(s5_abut), .cout(c5_abut));
  cla_segment #(.W(5), .SELECT(1'b1)) dut5s (.a(a5), .b(b5), .cin, .sum(s5_sel),  .cout(c5_sel));

  task automatic cmp(input logic [5:0] got, input logic [5:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%b got=%h exp=%h", what, a, b, cin, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = v[8:0];
      a5 = 5'($urandom); b5 = 5'($urandom);
      #1;
      cmp({1'b0, c_abut, s_abut}, 6'(a) + 6'(b) + 6'(cin), "abut4");
      cmp({1'b0, c_sel,  s_sel},  6'(a) + 6'(b) + 6'(cin), "sel4");
      cmp({c5_abut, s5_abut}, 6'(a5) + 6'(b5) + 6'(cin), "abut5");
      cmp({c5_sel,  s5_sel},  6'(a5) + 6'(b5) + 6'(cin), "sel5");
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
