// monoid_adder: an N-bit adder given by an algebraic expression over the
// carry monoid,
//   (G_N, P_N) = (G_{s[NB-1]}, P_{s[NB-1]}) op ... op (G_{s[0]}, P_{s[0]})
// with sum of the spans s[] equal to N.
//
// SPAN[j] is the look-ahead span of element j, element 0 being the least
// significant one (SPAN is a packed array, so in a concatenation the last
// field is element 0). SEL[j] gives the operator between
// element j and element j-1: 0 for "o" (abutted segments, the carry ripples
// between them) and 1 for "*" (carry-select interface). SEL[0] has no effect
// because the carry into bit 1 is c_0 = 0. Each element becomes one
// cla_segment of its span. The designs of the adder design space are
// configurations of this one module:
//   carry-ripple with look-ahead k : NB = N/k segments of span k, all SEL = 0
//   carry-select with look-ahead k : NB = N/k segments of span k, all SEL = 1
//   parallel-prefix                : NB = 1, SPAN = N
//   k = 1 with SEL = 0 is the plain ripple-carry adder.
// The defaults are the 6-bit adder (G_4, P_4)(3) o (G_2, P_2)(1): a 2-bit
// segment at bits 1-2 below a 4-bit segment at bits 3-6.
// Inputs a, b; outputs the N-bit sum and the carry-out. Combinational.
module monoid_adder #(
  parameter int N         = 6,
  parameter int NB        = 2,
  parameter bit [NB-1:0][15:0] SPAN = {16'd4, 16'd2},
  parameter bit [NB-1:0]       SEL  = 2'b00
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  // bit offset of element j
  function automatic int offset(input int j);
    int o;
    o = 0;
    for (int i = 0; i < j; i++) o += int'(SPAN[i]);
    return o;
  endfunction

  if (offset(NB) != N) begin : g_bad_spans
    $error("monoid_adder: the spans must add up to N");
  end

  logic [NB:0] carry;     // carry[j]: carry into element j
  assign carry[0] = 1'b0;

  for (genvar j = 0; j < NB; j++) begin : g_elem
    localparam int LO = offset(j);
    localparam int W  = int'(SPAN[j]);
    cla_segment #(.W(W), .SELECT(SEL[j])) u_seg (
      .a   (a[LO+W-1:LO]),
      .b   (b[LO+W-1:LO]),
      .cin (carry[j]),
      .sum (sum[LO+W-1:LO]),
      .cout(carry[j+1])
    );
  end

  assign cout = carry[NB];
endmodule
