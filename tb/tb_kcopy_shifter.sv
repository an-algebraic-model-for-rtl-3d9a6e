// tb_kcopy_shifter: checks the three shifters with K = 4 copies of each input
// bit (N = 64, so each copy covers 16 positions) on the same stimulus. All
// three are started together; each result must be the input rotated toward
// the MSB by the amount, and each done must come after the expected number
// of clock edges for residual r = amt mod 16:
//   linear: r + 1, barrel: 0 (result and done on the edge that takes
//   start), square: r div 8 + r mod 8 + 1, counted after the start edge.
// Every amount 0..63 is run, so every copy is selected.
module tb_kcopy_shifter;
  import modgen_pkg::*;
  localparam int N = 64;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0;
  logic [N-1:0]  din = '0;
  logic [5:0]    amt = '0;
  logic [2:0]    busy, done;
  logic [N-1:0]  dout [3];
  int checks = 0, failures = 0;

  kcopy_shifter #(.KIND(SHIFT_LINEAR)) dut_lin (
    .clk, .rst_n, .start, .din, .amt, .busy(busy[0]), .done(done[0]), .dout(dout[0]));
  kcopy_shifter #(.KIND(SHIFT_BARREL)) dut_bar (
    .clk, .rst_n, .start, .din, .amt, .busy(busy[1]), .done(done[1]), .dout(dout[1]));
  kcopy_shifter #(.KIND(SHIFT_SQUARE)) dut_sq (
    .clk, .rst_n, .start, .din, .amt, .busy(busy[2]), .done(done[2]), .dout(dout[2]));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rot(input logic [N-1:0] x, input int c);
    return (c == 0) ? x : ((x << c) | (x >> (N - c)));
  endfunction

  task automatic run(input logic [N-1:0] w, input int c);
    int cyc;
    int got [3];
    int exp [3];
    int r;
    r = c % 16;
    exp[0] = r + 1;
    exp[1] = 0;
    exp[2] = r / 8 + r % 8 + 1;
    got = '{-1, -1, -1};
    @(negedge clk);
    din = w; amt = 6'(c); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while ((got[0] < 0 || got[1] < 0 || got[2] < 0) && cyc < 200) begin
      for (int k = 0; k < 3; k++) begin
        if (done[k] && got[k] < 0) begin
          got[k] = cyc;
          checks++;
          if (dout[k] !== rot(w, c)) begin
            failures++;
            $display("FAIL kind=%0d c=%0d din=%h dout=%h", k, c, w, dout[k]);
          end
        end
      end
      @(negedge clk);
      cyc++;
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (got[k] != exp[k]) begin
        failures++;
        $display("FAIL kind=%0d c=%0d cycles got=%0d exp=%0d", k, c, got[k], exp[k]);
      end
    end
  endtask

  initial begin
    #22 rst_n = 1'b1;
    for (int c = 0; c < N; c++) run({$urandom, $urandom}, c);
    repeat (40) run({$urandom, $urandom}, int'($urandom % N));
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
