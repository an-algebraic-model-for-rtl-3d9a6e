// pp_block: K-bit parallel-prefix carry block (carry-look-ahead of span K).
//
// Inputs are the per-bit tuples gp_in[i] = (g_i, p_i) of K contiguous bit
// positions, index 0 the least significant. Output pre[i] is the block tuple
// (G_{i+1}, P_{i+1}) of positions 0..i, i.e. gp_in[i] o ... o gp_in[0].
//
// The block follows the recursive construction of a K-bit block from a block
// of half its size, in the Brent-Kung manner, unrolled into levels:
//  - going up, level l+1 holds the tuples of adjacent pairs (2m+1, 2m) of
//    level l, one "o" node each, until a single tuple is left;
//  - going down, the prefix of an odd position of level l is the prefix of
//    its pair on level l+1, and the prefix of an even position 2m > 0 is
//    up[l][2m] o prefix of pair m-1 on level l+1.
// Depth is about 2 log2 K nodes and the node count is below 2K. K need not be
// a power of two (an odd top position is treated as an even one).
// Combinational, no clock. Array entries outside a level's size are tied to
// the monoid identity so that every net has a driver.
module pp_block
  import modgen_pkg::*;
#(
  parameter int K = 4
) (
  input  gp_t [K-1:0] gp_in,
  output gp_t [K-1:0] pre
);
  // number of halving levels until one tuple is left
  function automatic int num_levels(input int k);
    int n, l;
    n = k;
    l = 0;
    while (n > 1) begin
      n = n / 2;
      l++;
    end
    return l;
  endfunction

  function automatic int level_size(input int k, input int l);
    int n;
    n = k;
    for (int i = 0; i < l; i++) n = n / 2;
    return n;
  endfunction

  localparam int L = num_levels(K);

  gp_t [K-1:0] up [L+1];   // tuples of groups on each level
  gp_t [K-1:0] dn [L+1];   // prefixes of groups on each level

  assign up[0] = gp_in;
  assign dn[L][0] = up[L][0];
  for (genvar i = 1; i < K; i++) begin : g_top_fill
    assign dn[L][i] = GP_IDENTITY;
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int S  = level_size(K, l);     // size of level l
    localparam int SN = S / 2;                // size of level l+1
    // up-sweep: pair combination
    for (genvar m = 0; m < K; m++) begin : g_up
      if (m < SN) begin : g_node
        gp_combine u_pair (.hi(up[l][2*m+1]), .lo(up[l][2*m]), .out(up[l+1][m]));
      end else begin : g_fill
        assign up[l+1][m] = GP_IDENTITY;
      end
    end
    // down-sweep: prefixes of level l from level l+1
    for (genvar i = 0; i < K; i++) begin : g_dn
      if (i >= S) begin : g_fill
        assign dn[l][i] = GP_IDENTITY;
      end else if (i == 0) begin : g_first
        assign dn[l][0] = up[l][0];
      end else if (i % 2 == 1) begin : g_odd
        assign dn[l][i] = dn[l+1][i/2];
      end else begin : g_even
        gp_combine u_even (.hi(up[l][i]), .lo(dn[l+1][i/2-1]), .out(dn[l][i]));
      end
    end
  end

  assign pre = dn[0];
endmodule
