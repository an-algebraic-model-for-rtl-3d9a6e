// tb_design_space_top: end-to-end test of the whole design at its default
// sizes (32-bit adders with look-ahead 4, 64-bit shifters with 4 copies).
//
// Adders: random and corner operands go to all adders at once; each sum and
// carry-out must equal a + b. The test counts how often a carry crosses a
// look-ahead segment boundary (the "o" ripple and the "*" select path taking
// its carry-in-1 result), how often a carry propagates through a whole
// segment, how often the carry-out is set, and how often the 2-bit block of
// the 6-bit adder carries into its 4-bit block.
// Shifters: every amount 0..63 and random ones go to all shifters at once,
// sometimes with a second start pulse while they are busy (which must be
// ignored). Each result must equal the rotated word and each done must come
// after the expected number of clock edges. The test counts zero shifts,
// right and up phases of the square array, and non-zero copy selections
// and zero residuals of the K-copy shifters.
// Every counted event must happen at least once.
module tb_design_space_top;
  localparam int NA = 32;
  localparam int NS = 64;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic [NA-1:0] add_a = '0, add_b = '0;
  logic [NA-1:0] sum_ripple, sum_select, sum_prefix;
  logic          cout_ripple, cout_select, cout_prefix;
  logic [5:0]    fig1_a = '0, fig1_b = '0, fig1_sum;
  logic          fig1_cout;
  logic          sh_start = 1'b0;
  logic [NS-1:0] sh_din = '0;
  logic [5:0]    sh_amt = '0;
  logic [NS-1:0] barrel_dout, lin_dout, sq_dout, klin_dout, kbar_dout, ksq_dout;
  logic [4:0]    sh_busy, sh_done;
  int checks = 0, failures = 0;

  // event counters
  int n_seg_carry = 0, n_seg_propagate = 0, n_cout = 0, n_fig1_carry = 0;
  int n_zero_shift = 0, n_sq_right = 0, n_sq_up = 0, n_copy_sel = 0;
  int n_zero_resid = 0, n_ignored_start = 0;

  design_space_top dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [NS:0] got, input logic [NS:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic add_case(input logic [NA-1:0] a, input logic [NA-1:0] b);
    logic [NA:0] exp;
    logic [6:0]  e6;
    add_a = a; add_b = b;
    fig1_a = a[5:0]; fig1_b = b[5:0];
    #1;
    exp = (NA+1)'(a) + (NA+1)'(b);
    expect_eq((NS+1)'({cout_ripple, sum_ripple}), (NS+1)'(exp), "ripple adder");
    expect_eq((NS+1)'({cout_select, sum_select}), (NS+1)'(exp), "select adder");
    expect_eq((NS+1)'({cout_prefix, sum_prefix}), (NS+1)'(exp), "prefix adder");
    e6 = 7'(a[5:0]) + 7'(b[5:0]);
    expect_eq((NS+1)'({fig1_cout, fig1_sum}), (NS+1)'(e6), "6-bit adder");
    for (int j = 1; j < NA / 4; j++) begin
      logic [NA:0] low;
      low = (NA+1)'(a & ((1 << (4*j)) - 1)) + (NA+1)'(b & ((1 << (4*j)) - 1));
      if (low[4*j]) begin
        n_seg_carry++;
        if ((a[4*j +: 4] ^ b[4*j +: 4]) == 4'hf) n_seg_propagate++;
      end
    end
    if (exp[NA]) n_cout++;
    if ((7'(a[1:0]) + 7'(b[1:0])) >= 4) n_fig1_carry++;
  endtask

  function automatic logic [NS-1:0] rot(input logic [NS-1:0] x, input int c);
    return (c == 0) ? x : ((x << c) | (x >> (NS - c)));
  endfunction

  task automatic shift_case(input logic [NS-1:0] w, input int c, input bit poke);
    int exp [5];
    int got [5];
    int cyc, r;
    logic [NS-1:0] res [5];
    r = c % 16;
    exp = '{c + 1, c / 8 + c % 8 + 1, r + 1, 0, r / 8 + r % 8 + 1};
    got = '{-1, -1, -1, -1, -1};
    if (c == 0) n_zero_shift++;
    if (c / 8 != 0) n_sq_right++;
    if (c % 8 != 0) n_sq_up++;
    if (c / 16 != 0) begin
      n_copy_sel++;
      if (r == 0) n_zero_resid++;
    end
    @(negedge clk);
    sh_din = w; sh_amt = 6'(c); sh_start = 1'b1;
    #1;
    expect_eq((NS+1)'(barrel_dout), (NS+1)'(rot(w, c)), "barrel shifter");
    @(negedge clk);
    sh_start = 1'b0;
    // the K-copy barrel finishes on the start edge; the others are busy now
    if (poke && sh_busy[1:0] == 2'b11) begin
      sh_din = ~w; sh_amt = 6'(c + 1); sh_start = 1'b1;
      n_ignored_start++;
    end
    cyc = 0;
    while ((got[0] < 0 || got[1] < 0 || got[2] < 0 || got[3] < 0 || got[4] < 0) && cyc < 300) begin
      res = '{lin_dout, sq_dout, klin_dout, kbar_dout, ksq_dout};
      for (int k = 0; k < 5; k++) begin
        if (sh_done[k] && got[k] < 0) begin
          got[k] = cyc;
          expect_eq((NS+1)'(res[k]), (NS+1)'(rot(w, c)), $sformatf("shifter %0d data", k));
        end
      end
      @(negedge clk);
      // a poke that restarts the K-copy barrel is harmless; stop it after one cycle
      sh_start = 1'b0;
      cyc++;
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (got[k] != exp[k]) begin
        failures++;
        $display("FAIL shifter %0d c=%0d cycles got=%0d exp=%0d", k, c, got[k], exp[k]);
      end
    end
  endtask

  task automatic need(input int n, input string what);
    checks++;
    $display("event %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL event never happened: %s", what);
    end
  endtask

  initial begin
    #22 rst_n = 1'b1;
    add_case('1, 32'd1);
    add_case(32'h0f0f_0f0f, 32'h00f0_f0f1);
    add_case(32'h5555_5555, 32'haaaa_aaaa);
    add_case(32'hffff_fff0, 32'h0000_0010);
    repeat (2000) add_case($urandom, $urandom);
    for (int c = 0; c < NS; c++) shift_case({$urandom, $urandom}, c, c % 3 == 2);
    repeat (64) shift_case({$urandom, $urandom}, int'($urandom % NS), 1'b1);
    need(n_seg_carry,     "carry across a segment boundary");
    need(n_seg_propagate, "carry through a whole segment");
    need(n_cout,          "carry-out set");
    need(n_fig1_carry,    "6-bit adder carry into 4-bit block");
    need(n_zero_shift,    "zero shift");
    need(n_sq_right,      "square array right phase");
    need(n_sq_up,         "square array up phase");
    need(n_copy_sel,      "K-copy non-zero copy selected");
    need(n_zero_resid,    "K-copy zero residual");
    need(n_ignored_start, "start while busy ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
