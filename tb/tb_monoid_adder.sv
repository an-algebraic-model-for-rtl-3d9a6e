// tb_monoid_adder: checks adders given by several expressions against a + b:
//   the default 6-bit (G_4,P_4) o (G_2,P_2), all 4096 operand pairs;
//   32-bit carry-ripple with look-ahead 4, carry-select with look-ahead 4,
//   parallel-prefix, plain ripple-carry (look-ahead 1), and a mixed
//   expression (G_8,P_8) * (G_16,P_16) o (G_5,P_5) * (G_3,P_3) on random
//   and corner operands (all ones plus one, alternating patterns).
module tb_monoid_adder;
  localparam int N = 32;
  logic [5:0]   a6, b6, s6;
  logic         c6;
  logic [N-1:0] a, b;
  logic [N-1:0] s_rip, s_sel, s_pre, s_one, s_mix;
  logic         c_rip, c_sel, c_pre, c_one, c_mix;
  int checks = 0, failures = 0;

  monoid_adder dut_fig1 (.a(a6), .b(b6), .sum(s6), .cout(c6));
  monoid_adder #(.N(N), .NB(8), .SPAN({8{16'd4}}), .SEL(8'h00))
    dut_rip (.a, .b, .sum(s_rip), .cout(c_rip));
  monoid_adder #(.N(N), .NB(8), .SPAN({8{16'd4}}), .SEL(8'hff))
    dut_sel (.a, .b, .sum(s_sel), .cout(c_sel));
  monoid_adder #(.N(N), .NB(1), .SPAN(16'd32), .SEL(1'b0))
    dut_pre (.a, .b, .sum(s_pre), .cout(c_pre));
  monoid_adder #(.N(N), .NB(32), .SPAN({32{16'd1}}), .SEL(32'h0))
    dut_one (.a, .b, .sum(s_one), .cout(c_one));
  monoid_adder #(.N(N), .NB(4), .SPAN({16'd8, 16'd16, 16'd5, 16'd3}), .SEL(4'b1010))
    dut_mix (.a, .b, .sum(s_mix), .cout(c_mix));

  task automatic cmp(input logic [N:0] got, input logic [N:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  task automatic check32();
    logic [N:0] exp;
    #1;
    exp = (N+1)'(a) + (N+1)'(b);
    cmp({c_rip, s_rip}, exp, "ripple-k4");
    cmp({c_sel, s_sel}, exp, "select-k4");
    cmp({c_pre, s_pre}, exp, "prefix");
    cmp({c_one, s_one}, exp, "ripple-k1");
    cmp({c_mix, s_mix}, exp, "mixed");
  endtask

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a6, b6} = v[11:0];
      #1;
      checks++;
      if ({c6, s6} !== 7'(a6) + 7'(b6)) begin
        failures++;
        $display("FAIL fig1 a=%h b=%h got=%h", a6, b6, {c6, s6});
      end
    end
    a = '1;           b = 32'd1;         check32();
    a = 32'h5555_5555; b = 32'haaaa_aaaa; check32();
    a = 32'h0000_ffff; b = 32'h0000_0001; check32();
    a = '1;           b = '1;            check32();
    a = '0;           b = '0;            check32();
    repeat (3000) begin
      a = $urandom; b = $urandom;
      check32();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
