// dr_rca4: asynchronous dual-rail RSFQ ripple-carry adder (4 bits).
//
// Adds two N-bit numbers, each bit a dual-rail pulse pair, with a dual-rail
// carry in. There is no clock in the circuit being modelled: every bit may
// arrive at any time, each full adder fires as soon as its three inputs are
// present, and its carry pulse travels on to the next bit. The result is
// complete when every sum bit and the carry out have pulsed once, on the
// rail that gives its value; a pulse on either rail of an output is the
// completion signal for that bit. The total delay depends on the bit
// pattern and on when and in what order the inputs arrive. N = 4 full adders
// are chained, bit 0 (the least significant) taking ci.
//
// Interface: a[i], b[i], s[i] are bit i of the operands and of the sum;
// ci is the carry in, co the carry out (sum bit N). clk is the simulation
// time step (one cycle = 1 ps), rst_n asynchronous, active low. Each input
// takes one pulse per addition, on one of its rails; a new addition may start
// once every output of the previous one has pulsed. The cell delays are the
// parameters T_SPLIT, T_AND, T_XOR and T_OR, shared by all bits.
module dr_rca4
  import dr_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned T_SPLIT = SPLIT_T_OUT_DEFAULT,
  parameter delay_tab_t  T_AND   = AND_T_OUT_DEFAULT,
  parameter delay_tab_t  T_XOR   = XOR_T_OUT_DEFAULT,
  parameter delay_tab_t  T_OR    = AND_T_OUT_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  dr_t [N-1:0] a,
  input  dr_t [N-1:0] b,
  input  dr_t        ci,
  output dr_t [N-1:0] s,
  output dr_t        co
);

  dr_t [N:0] carry;

  assign carry[0] = ci;

  for (genvar i = 0; i < int'(N); i++) begin : g_bit
    dr_full_adder #(
      .T_SPLIT(T_SPLIT), .T_AND(T_AND), .T_XOR(T_XOR), .T_OR(T_OR)
    ) u_fa (
      .clk(clk), .rst_n(rst_n),
      .a(a[i]), .b(b[i]), .ci(carry[i]),
      .s(s[i]), .co(carry[i+1])
    );
  end

  assign co = carry[N];

endmodule
