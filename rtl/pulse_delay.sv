// pulse_delay: transport delay line for single-cycle pulses.
//
// Models the "transport" delay of a pulse-driven cell: every pulse injected is
// reproduced on the output exactly `delay` time steps after the input pulse
// that caused it, however many pulses are already on their way (a pulse is
// never swallowed by a later one). It is a shift register of DEPTH stages
// that moves toward stage 0; a pulse that must appear after d steps is
// written into stage d-1.
//
// Interface: `inject` is sampled on the rising clock edge together with
// `delay` (1..DEPTH); `pulse_out` is registered. A pulse on inject in the
// cycle that starts at edge k-1 appears on pulse_out in the cycle that starts
// at edge k-1+delay. Pulses injected with a delay outside 1..DEPTH are lost,
// which an assertion reports.
module pulse_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [WIDTH-1:0]             inject,
  input  logic [$clog2(DEPTH+1)-1:0]   delay,
  output logic [WIDTH-1:0]             pulse_out
);

  logic [DEPTH*WIDTH-1:0] line_q;
  logic [DEPTH*WIDTH-1:0] line_d;

  always_comb begin
    line_d = line_q >> WIDTH;
    for (int i = 0; i < int'(DEPTH); i++)
      if (int'(delay) == i + 1)
        line_d[i*WIDTH +: WIDTH] = line_d[i*WIDTH +: WIDTH] | inject;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) line_q <= '0;
    else        line_q <= line_d;
  end

  assign pulse_out = line_q[WIDTH-1:0];

  a_delay_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (|inject) |-> (delay >= 1 && int'(delay) <= int'(DEPTH)))
    else $error("pulse_delay: delay %0d outside 1..%0d", delay, DEPTH);

endmodule
