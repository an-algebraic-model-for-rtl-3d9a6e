// tb_barrel_shifter: every amount 0..63 on random words for the default
// 64-bit shifter, and every amount on a 16-bit one; dout must be din rotated
// toward the MSB by amt.
module tb_barrel_shifter;
  logic [63:0] din, dout;
  logic [5:0]  amt;
  logic [15:0] din16, dout16;
  logic [3:0]  amt16;
  int checks = 0, failures = 0;

  barrel_shifter          dut   (.din, .amt, .dout);
  barrel_shifter #(.N(16)) dut16 (.din(din16), .amt(amt16), .dout(dout16));

  function automatic logic [63:0] rot64(input logic [63:0] x, input int c);
    return (c == 0) ? x : ((x << c) | (x >> (64 - c)));
  endfunction
  function automatic logic [15:0] rot16(input logic [15:0] x, input int c);
    return (c == 0) ? x : ((x << c) | (x >> (16 - c)));
  endfunction

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int c = 0; c < 64; c++) begin
        din = {$urandom, $urandom}; amt = 6'(c);
        din16 = 16'($urandom); amt16 = 4'(c);
        #1;
        checks++;
        if (dout !== rot64(din, c)) begin
          failures++;
          $display("FAIL n=64 c=%0d din=%h dout=%h", c, din, dout);
        end
        checks++;
        if (dout16 !== rot16(din16, c % 16)) begin
          failures++;
          $display("FAIL n=16 c=%0d din=%h dout=%h", c, din16, dout16);
        end
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
