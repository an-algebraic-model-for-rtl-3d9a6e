// tb_square_shifter: checks the 64-bit square shifter (8 x 8 array) and a
// 64-bit array of another aspect ratio (4 rows x 16 columns) on the same
// stimulus. Each run starts both with a random word and amount c (every c in
// 0..63 at least once) and waits for both done pulses; each dout must equal
// the word rotated toward the MSB by c, and done must come exactly
// c div ROWS + c mod ROWS + 1 clock edges after the start edge. A second
// start pulse while busy must be ignored.
module tb_square_shifter;
  localparam int N = 64;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0;
  logic [N-1:0]  din = '0;
  logic [5:0]    amt = '0;
  logic [1:0]    busy, done;
  logic [N-1:0]  dout [2];
  int checks = 0, failures = 0;

  square_shifter             dut    (.clk, .rst_n, .start, .din, .amt,
                                     .busy(busy[0]), .done(done[0]), .dout(dout[0]));
  square_shifter #(.ROWS(4)) dut_r4 (.clk, .rst_n, .start, .din, .amt,
                                     .busy(busy[1]), .done(done[1]), .dout(dout[1]));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rot(input logic [N-1:0] x, input int c);
    return (c == 0) ? x : ((x << c) | (x >> (N - c)));
  endfunction

  task automatic run(input logic [N-1:0] w, input int c, input bit poke);
    int cyc;
    int got [2];
    int exp [2];
    exp = '{c / 8 + c % 8 + 1, c / 4 + c % 4 + 1};
    got = '{-1, -1};
    @(negedge clk);
    din = w; amt = 6'(c); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (poke) begin
      din = ~w; amt = 6'(c + 1); start = 1'b1;   // must be ignored
    end
    cyc = 0;
    while ((got[0] < 0 || got[1] < 0) && cyc < 200) begin
      for (int k = 0; k < 2; k++) begin
        if (done[k] && got[k] < 0) begin
          got[k] = cyc;
          checks++;
          if (dout[k] !== rot(w, c)) begin
            failures++;
            $display("FAIL array %0d data c=%0d din=%h dout=%h", k, c, w, dout[k]);
          end
        end
      end
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (got[k] != exp[k]) begin
        failures++;
        $display("FAIL array %0d cycles c=%0d got=%0d exp=%0d", k, c, got[k], exp[k]);
      end
    end
  endtask

  initial begin
    #22 rst_n = 1'b1;
    for (int c = 0; c < N; c++) run({$urandom, $urandom}, c, c > 4 && c % 2 == 1);
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
