// cla_segment: the adder circuit of one monoid element (G_W, P_W)(j), i.e. a
// carry-look-ahead segment of span W bits, with its interface to the segment
// below it.
//
// Each bit slice forms g = a & b and p = a ^ b. A W-bit parallel-prefix block
// (pp_block) gives the prefix tuple (G, P) of positions 0..m of the segment
// for every m. The carry into the segment, cin, is the carry-out of the
// segment below (0 for the lowest one). Two interface kinds exist:
//  SELECT = 0, operator "o": the segment is abutted to the one below. Every
//    internal carry is G | (P & cin) and the carry ripples into the next
//    segment.
//  SELECT = 1, operator "*": carry-select. The segment computes its sum bits
//    and carry-out for a carry-in of 0 (carry G) and of 1 (carry G | P) from
//    the one shared prefix block, and a row of multiplexers picks one set
//    with cin. The prefix block is not duplicated: the carry-out for a
//    carry-in of 1 is G | P.
// Both kinds give the same sum; they differ in structure and delay.
// Combinational, no clock.
module cla_segment
  import modgen_pkg::*;
#(
  parameter int W      = 4,
  parameter bit SELECT = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  gp_t [W-1:0] gp;
  gp_t [W-1:0] pre;

  for (genvar m = 0; m < W; m++) begin : g_slice
    assign gp[m].g = a[m] & b[m];
    assign gp[m].p = a[m] ^ b[m];
  end

  pp_block #(.K(W)) u_prefix (.gp_in(gp), .pre(pre));

  if (!SELECT) begin : g_abut
    logic [W-1:0] c;   // carry out of position m
    for (genvar m = 0; m < W; m++) begin : g_bit
      assign c[m] = pre[m].g | (pre[m].p & cin);
      if (m == 0) begin : g_lsb
        assign sum[m] = gp[m].p ^ cin;
      end else begin : g_up
        assign sum[m] = gp[m].p ^ c[m-1];
      end
    end
    assign cout = c[W-1];
  end else begin : g_select
    logic [W-1:0] sum0, sum1;
    for (genvar m = 0; m < W; m++) begin : g_bit
      if (m == 0) begin : g_lsb
        assign sum0[m] = gp[m].p;
        assign sum1[m] = ~gp[m].p;
      end else begin : g_up
        assign sum0[m] = gp[m].p ^ pre[m-1].g;
        assign sum1[m] = gp[m].p ^ (pre[m-1].g | pre[m-1].p);
      end
    end
    assign sum  = cin ? sum1 : sum0;
    assign cout = cin ? (pre[W-1].g | pre[W-1].p) : pre[W-1].g;
  end
endmodule
