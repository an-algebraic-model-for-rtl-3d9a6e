// tb_linear_shifter: checks the 64-bit linear (ring) shifter.
// Each run starts the shifter with a random word and amount (every amount
// 0..63 is run at least once) and waits for done; dout must equal the word
// rotated toward the MSB by the amount, and done must come exactly the
// expected number of clock edges after the start edge: c + 1.
// A start pulse while busy must be ignored.
module tb_linear_shifter;
  import modgen_pkg::*;
  localparam int N = 64;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0;
  logic [N-1:0]  din = '0, dout;
  logic [5:0]    amt = '0;
  logic          busy, done;
  int checks = 0, failures = 0;
  int cyc;

  linear_shifter dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rot(input logic [N-1:0] x, input int c);
    return (c == 0) ? x : ((x << c) | (x >> (N - c)));
  endfunction

  function automatic int expected_cycles(input int c);
    return c + 1;
  endfunction

  task automatic run(input logic [N-1:0] w, input int c, input bit poke);
    @(negedge clk);
    din = w; amt = 6'(c); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (poke) begin
      din = ~w; amt = 6'(c + 1); start = 1'b1;   // must be ignored
    end
    cyc = 0;
    while (!done && cyc < 200) begin
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    checks++;
    if (dout !== rot(w, c)) begin
      failures++;
      $display("FAIL data c=%0d din=%h dout=%h", c, w, dout);
    end
    checks++;
    if (cyc !== expected_cycles(c)) begin
      failures++;
      $display("FAIL cycles c=%0d got=%0d exp=%0d", c, cyc, expected_cycles(c));
    end
  endtask

  initial begin
    #22 rst_n = 1'b1;
    for (int c = 0; c < N; c++) run({$urandom, $urandom}, c, c > 2 && c % 2 == 1);
    repeat (60) run({$urandom, $urandom}, int'($urandom % N), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
