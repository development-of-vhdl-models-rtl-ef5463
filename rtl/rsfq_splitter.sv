// rsfq_splitter: RSFQ signal splitter (one single-rail line in, two out).
//
// In RSFQ logic a line cannot simply fan out, so a splitter cell is placed
// wherever a line branches. It is data driven and has no state: each pulse
// on signal_in appears on both out_a and out_b after one fixed delay T_OUT.
// The single timing parameter and its value of 11 ps follow the cell
// description; one clock cycle stands for one picosecond.
//
// Interface: signal_in, out_a and out_b carry single-cycle pulses; the clock
// is the simulation time step and rst_n (asynchronous, active low) clears
// pulses in flight. Timing: a pulse entering in cycle t leaves in cycle
// t + T_OUT, on both outputs; pulses closer together than T_OUT are all
// delivered (transport delay).
module rsfq_splitter #(
  parameter int unsigned T_OUT = dr_pkg::SPLIT_T_OUT_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic signal_in,
  output logic out_a,
  output logic out_b
);

  localparam int unsigned DW = $clog2(T_OUT + 1);

  logic delayed;

  pulse_delay #(.WIDTH(1), .DEPTH(T_OUT)) u_line (
    .clk      (clk),
    .rst_n    (rst_n),
    .inject   (signal_in),
    .delay    (DW'(T_OUT)),
    .pulse_out(delayed)
  );

  assign out_a = delayed;
  assign out_b = delayed;

  if (T_OUT < 1) begin : g_bad_delay
    $error("rsfq_splitter: T_OUT must be at least 1");
  end

endmodule
