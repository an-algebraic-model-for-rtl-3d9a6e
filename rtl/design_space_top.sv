// design_space_top: the adder and shifter design spaces side by side.
//
// The adders all add the same operands add_a + add_b (carry-in 0):
//   ripple : carry-ripple adder with look-ahead K_ADD, N_ADD/K_ADD
//            parallel-prefix segments of span K_ADD joined by "o"
//   select : carry-select adder with look-ahead K_ADD, the same segments
//            joined by "*"
//   prefix : parallel-prefix adder, one segment of span N_ADD
//   fig1   : the 6-bit adder (G_4, P_4)(3) o (G_2, P_2)(1), own operands
// The shifters all rotate sh_din by sh_amt toward the MSB:
//   barrel                  : combinational barrel shifter (group G2)
//   lin, sq                 : linear ring and square array (G1, G3)
//   klin, kbar, ksq         : the same three with K_SH copies of every input
//                             bit (G4, G5, G6)
// sh_start starts every sequential shifter that is idle; each raises its own
// done pulse when its result is on its dout (see the shifter modules for the
// cycle counts). The word sizes and look-ahead/copy counts are this design's
// choices; the structures are those of the algebraic design-space model.
module design_space_top
  import modgen_pkg::*;
#(
  parameter int N_ADD = 32,
  parameter int K_ADD = 4,
  parameter int N_SH  = 64,
  parameter int K_SH  = 4,
  parameter int AW_SH = $clog2(N_SH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // adders
  input  logic [N_ADD-1:0] add_a,
  input  logic [N_ADD-1:0] add_b,
  output logic [N_ADD-1:0] sum_ripple,
  output logic             cout_ripple,
  output logic [N_ADD-1:0] sum_select,
  output logic             cout_select,
  output logic [N_ADD-1:0] sum_prefix,
  output logic             cout_prefix,
  input  logic [5:0]       fig1_a,
  input  logic [5:0]       fig1_b,
  output logic [5:0]       fig1_sum,
  output logic             fig1_cout,
  // shifters
  input  logic             sh_start,
  input  logic [N_SH-1:0]  sh_din,
  input  logic [AW_SH-1:0] sh_amt,
  output logic [N_SH-1:0]  barrel_dout,
  output logic [4:0]       sh_busy,   // {ksq, kbar, klin, sq, lin}
  output logic [4:0]       sh_done,   // {ksq, kbar, klin, sq, lin}
  output logic [N_SH-1:0]  lin_dout,
  output logic [N_SH-1:0]  sq_dout,
  output logic [N_SH-1:0]  klin_dout,
  output logic [N_SH-1:0]  kbar_dout,
  output logic [N_SH-1:0]  ksq_dout
);
  localparam int NB = N_ADD / K_ADD;

  monoid_adder #(
    .N(N_ADD), .NB(NB), .SPAN({NB{16'(K_ADD)}}), .SEL({NB{1'b0}})
  ) u_ripple (.a(add_a), .b(add_b), .sum(sum_ripple), .cout(cout_ripple));

  monoid_adder #(
    .N(N_ADD), .NB(NB), .SPAN({NB{16'(K_ADD)}}), .SEL({NB{1'b1}})
  ) u_select (.a(add_a), .b(add_b), .sum(sum_select), .cout(cout_select));

  monoid_adder #(
    .N(N_ADD), .NB(1), .SPAN(16'(N_ADD)), .SEL(1'b0)
  ) u_prefix (.a(add_a), .b(add_b), .sum(sum_prefix), .cout(cout_prefix));

  monoid_adder u_fig1 (.a(fig1_a), .b(fig1_b), .sum(fig1_sum), .cout(fig1_cout));

  barrel_shifter #(.N(N_SH)) u_barrel (.din(sh_din), .amt(sh_amt), .dout(barrel_dout));

  linear_shifter #(.N(N_SH)) u_lin (
    .clk, .rst_n, .start(sh_start), .din(sh_din), .amt(sh_amt),
    .busy(sh_busy[0]), .done(sh_done[0]), .dout(lin_dout)
  );

  square_shifter #(.N(N_SH)) u_sq (
    .clk, .rst_n, .start(sh_start), .din(sh_din), .amt(sh_amt),
    .busy(sh_busy[1]), .done(sh_done[1]), .dout(sq_dout)
  );

  kcopy_shifter #(.N(N_SH), .K(K_SH), .KIND(SHIFT_LINEAR)) u_klin (
    .clk, .rst_n, .start(sh_start), .din(sh_din), .amt(sh_amt),
    .busy(sh_busy[2]), .done(sh_done[2]), .dout(klin_dout)
  );

  kcopy_shifter #(.N(N_SH), .K(K_SH), .KIND(SHIFT_BARREL)) u_kbar (
    .clk, .rst_n, .start(sh_start), .din(sh_din), .amt(sh_amt),
    .busy(sh_busy[3]), .done(sh_done[3]), .dout(kbar_dout)
  );

  kcopy_shifter #(.N(N_SH), .K(K_SH), .KIND(SHIFT_SQUARE)) u_ksq (
    .clk, .rst_n, .start(sh_start), .din(sh_din), .amt(sh_amt),
    .busy(sh_busy[4]), .done(sh_done[4]), .dout(ksq_dout)
  );
endmodule
