// tb_pp_block: checks parallel-prefix blocks of spans 4 (default), 3, 6 and
// 32 against a sequential left-to-right fold of the (g,p) tuples. Span 4 is
// checked on all 256 inputs, the others on random inputs.
module tb_pp_block;
  import modgen_pkg::*;
  int checks = 0, failures = 0;

  gp_t [3:0]  in4;  gp_t [3:0]  pre4;
  gp_t [2:0]  in3;  gp_t [2:0]  pre3;
  gp_t [5:0]  in6;  gp_t [5:0]  pre6;
  gp_t [31:0] in32; gp_t [31:0] pre32;

  pp_block              dut4  (.gp_in(in4),  .pre(pre4));
  pp_block #(.K(3))     dut3  (.gp_in(in3),  .pre(pre3));
  pp_block #(.K(6))     dut6  (.gp_in(in6),  .pre(pre6));
  pp_block #(.K(32))    dut32 (.gp_in(in32), .pre(pre32));

  // reference: fold from bit 0 upward, written with plain logic operators
  function automatic logic [63:0] ref_prefix(input logic [63:0] bits, input int k);
    logic g, p;
    logic [63:0] r;
    g = 1'b0; p = 1'b1; r = '0;
    for (int i = 0; i < k; i++) begin
      g = bits[2*i+1] | (bits[2*i] & g);
      p = bits[2*i] & p;
      r[2*i+1] = g; r[2*i] = p;
    end
    return r;
  endfunction

  task automatic cmp(input logic [63:0] got, input logic [63:0] exp, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL K=%0d got=%h exp=%h", k, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      in4 = v[7:0]; #1;
      cmp(64'(pre4), ref_prefix(64'(in4), 4), 4);
    end
    repeat (500) begin
      in3  = 6'($urandom);
      in6  = 12'($urandom);
      in32 = {$urandom, $urandom};
      #1;
      cmp(64'(pre3), ref_prefix(64'(in3), 3), 3);
      cmp(64'(pre6), ref_prefix(64'(in6), 6), 6);
      cmp(64'(pre32), ref_prefix(64'(in32), 32), 32);
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
