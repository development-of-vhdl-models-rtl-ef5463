// dr_xor: asynchronous dual-rail RSFQ XOR gate.
//
// Each input is a dual-rail pair (dr_pkg::dr_t): a pulse on `one` is a
// logical 1, a pulse on `zero` a logical 0. The two inputs may arrive in
// either order and at different times. The gate remembers the value of the
// input that came first until the other one arrives; in the time step in
// which the second input arrives it computes a XOR b and sends one pulse on
// y.one (result 1) or y.zero (result 0), then forgets both inputs and is
// ready for the next datum. The output delay is looked up in T_OUT by the
// arrival order (a first, b first, or both in the same time step) and by the
// two input values, as the cell model prescribes with one delay generic per
// arrival case. The numbers in the default table are placeholders of this
// design (dr_pkg).
//
// Interface: clk is the time step (one cycle = 1 ps), rst_n asynchronous and
// active low. Timing: if the later input pulse is in cycle t, the output
// pulse is in cycle t + T_OUT[order][{a,b}]. Inputs must obey the dual-rail
// protocol: never both rails of one input at once, and no second datum on an
// input before the other input has completed the first; assertions check it.
module dr_xor
  import dr_pkg::*;
#(
  parameter delay_tab_t T_OUT = XOR_T_OUT_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  dr_t  a,
  input  dr_t  b,
  output dr_t  y
);

  localparam int unsigned DEPTH = tab_max(T_OUT);
  localparam int unsigned DW    = $clog2(DEPTH + 1);

  // Value memory for the input that has arrived but is not yet used.
  logic a_held_q, a_val_q;
  logic b_held_q, b_val_q;

  logic   a_arr, b_arr;     // a pulse on either rail in this time step
  logic   a_val, b_val;     // value of each input, held or arriving now
  logic   fire;             // both inputs known: evaluate now
  logic   result;
  order_e order;
  logic [DW-1:0] delay;

  always_comb begin
    a_arr  = a.one | a.zero;
    b_arr  = b.one | b.zero;
    a_val  = a_held_q ? a_val_q : a.one;
    b_val  = b_held_q ? b_val_q : b.one;
    fire   = (a_held_q | a_arr) & (b_held_q | b_arr);
    result = a_val ^ b_val;
    if (a_held_q && !b_held_q)      order = ORD_A_FIRST;
    else if (b_held_q && !a_held_q) order = ORD_B_FIRST;
    else                            order = ORD_SAME;
    delay  = DW'(T_OUT[order][{a_val, b_val}]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_held_q <= 1'b0;
      a_val_q  <= 1'b0;
      b_held_q <= 1'b0;
      b_val_q  <= 1'b0;
    end else if (fire) begin
      a_held_q <= 1'b0;
      b_held_q <= 1'b0;
    end else begin
      if (a_arr) begin
        a_held_q <= 1'b1;
        a_val_q  <= a.one;
      end
      if (b_arr) begin
        b_held_q <= 1'b1;
        b_val_q  <= b.one;
      end
    end
  end

  logic [1:0] out_pulse;

  pulse_delay #(.WIDTH(2), .DEPTH(DEPTH)) u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .inject   ({fire & result, fire & ~result}),
    .delay    (delay),
    .pulse_out(out_pulse)
  );

  assign y.one  = out_pulse[1];
  assign y.zero = out_pulse[0];

  if (tab_min(T_OUT) < 1) begin : g_bad_delay
    $error("dr_xor: every T_OUT entry must be at least 1");
  end

  a_a_rails: assert property (@(posedge clk) disable iff (!rst_n) !(a.one && a.zero))
    else $error("dr_xor: both rails of input a pulsed together");
  a_b_rails: assert property (@(posedge clk) disable iff (!rst_n) !(b.one && b.zero))
    else $error("dr_xor: both rails of input b pulsed together");
  a_a_once: assert property (@(posedge clk) disable iff (!rst_n) !(a_held_q && a_arr))
    else $error("dr_xor: second datum on a before b arrived");
  a_b_once: assert property (@(posedge clk) disable iff (!rst_n) !(b_held_q && b_arr))
    else $error("dr_xor: second datum on b before a arrived");

endmodule
