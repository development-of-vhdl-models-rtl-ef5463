// dr_half_adder: asynchronous dual-rail RSFQ half adder.
//
// Structure as in the textbook dual-rail half adder for RSFQ: each of the
// four input lines (a.one, a.zero, b.one, b.zero) enters a splitter, because
// both gates need every line; one branch of each splitter feeds a dual-rail
// AND that produces the carry c, the other feeds a dual-rail XOR that
// produces the sum s. Port a drives the gates' a inputs and port b their b
// inputs, so the gates' arrival-order delay tables see "a first" when this
// cell's a arrives first.
//
// Interface: dual-rail pulse inputs a, b and outputs c (carry = a AND b) and
// s (sum = a XOR b); clk is the time step (1 cycle = 1 ps), rst_n
// asynchronous, active low. Timing: with the later input in cycle t, c leaves
// at t + T_SPLIT + T_AND[order][{a,b}] and s at t + T_SPLIT +
// T_XOR[order][{a,b}]. The delays are parameters so that each instance in a
// larger circuit can carry its own extracted values.
module dr_half_adder
  import dr_pkg::*;
#(
  parameter int unsigned T_SPLIT = SPLIT_T_OUT_DEFAULT,
  parameter delay_tab_t  T_AND   = AND_T_OUT_DEFAULT,
  parameter delay_tab_t  T_XOR   = XOR_T_OUT_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  dr_t  a,
  input  dr_t  b,
  output dr_t  c,
  output dr_t  s
);

  // Branches of the four splitters: *_and goes to the AND, *_xor to the XOR.
  dr_t a_and, a_xor, b_and, b_xor;

  rsfq_splitter #(.T_OUT(T_SPLIT)) u_spl_a1 (
    .clk(clk), .rst_n(rst_n), .signal_in(a.one),  .out_a(a_and.one),  .out_b(a_xor.one));
  rsfq_splitter #(.T_OUT(T_SPLIT)) u_spl_a0 (
    .clk(clk), .rst_n(rst_n), .signal_in(a.zero), .out_a(a_and.zero), .out_b(a_xor.zero));
  rsfq_splitter #(.T_OUT(T_SPLIT)) u_spl_b1 (
    .clk(clk), .rst_n(rst_n), .signal_in(b.one),  .out_a(b_and.one),  .out_b(b_xor.one));
  rsfq_splitter #(.T_OUT(T_SPLIT)) u_spl_b0 (
    .clk(clk), .rst_n(rst_n), .signal_in(b.zero), .out_a(b_and.zero), .out_b(b_xor.zero));

  dr_and #(.T_OUT(T_AND)) u_and (
    .clk(clk), .rst_n(rst_n), .a(a_and), .b(b_and), .y(c));

  dr_xor #(.T_OUT(T_XOR)) u_xor (
    .clk(clk), .rst_n(rst_n), .a(a_xor), .b(b_xor), .y(s));

endmodule
