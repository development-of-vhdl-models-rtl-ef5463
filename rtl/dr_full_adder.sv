// dr_full_adder: asynchronous dual-rail RSFQ full adder.
//
// Two dual-rail half adders in the classical arrangement: the first adds a
// and b, the second adds the first one's sum (its a input) and the carry in
// ci (its b input) and gives the sum s. The carry out is the OR of the two
// half-adder carries. There is no dual-rail OR cell; it is a dual-rail AND
// with both inputs and the output inverted, and inverting a dual-rail signal
// costs nothing: its two lines are swapped (De Morgan: c1 | c2 =
// ~(~c1 & ~c2)). The carry of the first half adder drives that AND's a
// input, the carry of the second its b input.
//
// Interface: dual-rail pulse inputs a, b, ci and outputs s, co; clk is the
// time step (1 cycle = 1 ps), rst_n asynchronous, active low. Timing is the
// sum of the cell delays along the path taken (see dr_half_adder); the OR
// stage uses the table T_OR, indexed by its inverted inputs {~c1, ~c2}. The
// full adder produces no output until all three inputs have arrived.
module dr_full_adder
  import dr_pkg::*;
#(
  parameter int unsigned T_SPLIT = SPLIT_T_OUT_DEFAULT,
  parameter delay_tab_t  T_AND   = AND_T_OUT_DEFAULT,
  parameter delay_tab_t  T_XOR   = XOR_T_OUT_DEFAULT,
  parameter delay_tab_t  T_OR    = AND_T_OUT_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  ci,
  output dr_t  s,
  output dr_t  co
);

  dr_t s1, c1, c2;
  dr_t nc1, nc2, nco;

  dr_half_adder #(.T_SPLIT(T_SPLIT), .T_AND(T_AND), .T_XOR(T_XOR)) u_ha1 (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c1), .s(s1));

  dr_half_adder #(.T_SPLIT(T_SPLIT), .T_AND(T_AND), .T_XOR(T_XOR)) u_ha2 (
    .clk(clk), .rst_n(rst_n), .a(s1), .b(ci), .c(c2), .s(s));

  // Rail swap = logical inversion.
  assign nc1 = '{one: c1.zero, zero: c1.one};
  assign nc2 = '{one: c2.zero, zero: c2.one};

  dr_and #(.T_OUT(T_OR)) u_or (
    .clk(clk), .rst_n(rst_n), .a(nc1), .b(nc2), .y(nco));

  assign co = '{one: nco.zero, zero: nco.one};

endmodule
