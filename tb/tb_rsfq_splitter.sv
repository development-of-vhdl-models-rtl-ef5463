// tb_rsfq_splitter: self-checking testbench of the RSFQ splitter.
//
// Sends single pulses and bursts of pulses spaced closer than the splitter
// delay, and checks that every pulse appears on both outputs exactly T_OUT
// time steps later, with no extra or missing pulse. Runs at the default
// delay of 11 time steps.
module tb_rsfq_splitter;
  localparam int unsigned T_OUT = dr_pkg::SPLIT_T_OUT_DEFAULT;
  localparam int          LEN   = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sig_in = 1'b0;
  logic out_a, out_b;
  int   cyc = 0;
  int   checks = 0, failures = 0;
  bit   stim [LEN];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  rsfq_splitter dut (.clk(clk), .rst_n(rst_n), .signal_in(sig_in),
                     .out_a(out_a), .out_b(out_b));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    int npulse;
    // Stimulus: isolated pulses, then a dense random burst.
    for (int i = 0; i < LEN; i++) stim[i] = 1'b0;
    stim[3] = 1; stim[40] = 1; stim[41] = 1; stim[60] = 1; stim[65] = 1;
    for (int i = 100; i < LEN - 40; i++) stim[i] = ($urandom_range(0, 2) == 0);
    npulse = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    t0 = cyc;
    for (int k = 0; k < LEN; k++) begin
      // Drive the pulse for step k and check the outputs of this step.
      sig_in = stim[k];
      if (stim[k]) npulse++;
      begin
        bit exp_o;
        exp_o = (k >= int'(T_OUT)) ? stim[k - int'(T_OUT)] : 1'b0;
        checks++;
        if (out_a !== exp_o || out_b !== exp_o) begin
          failures++;
          if (failures < 10)
            $display("step %0d: out_a=%0b out_b=%0b expected %0b", k, out_a, out_b, exp_o);
        end
      end
      @(negedge clk);
    end
    sig_in = 1'b0;
    if (cyc - t0 != LEN) begin
      failures++;
      $display("cycle bookkeeping off");
    end
    $display("splitter: %0d pulses passed, delay %0d", npulse, T_OUT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
