// tb_dr_rca4_workloads: the operand patterns used to characterise the
// 4-bit dual-rail adder, at the default cell delays.
//
// Runs A=1011, B=0111, carry in 0 (sum 10010) with the least significant
// bits arriving first and again with the most significant bits first, and
// the five patterns of the delay table (A/B = 0111/1011, 1010/0101,
// 0000/0000, 1111/0000, 1111/1111, least significant bits first). The
// inputs of bit i arrive in time slot i (or N-1-i): a at the start of the
// slot, b half a slot later, the carry in at step 0. Each run is checked for
// the sum value and for the time of every output pulse against the reference
// model, and the total delay (first input pulse to last output pulse) is
// printed. With the placeholder cell delays of this design the printed
// delays are not expected to equal measured ones.
module tb_dr_rca4_workloads;
  import dr_pkg::*;
  import dr_ref_pkg::*;

  localparam int N = 4;
  localparam int SLOT = 40;
  localparam int NPAT = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dr_t [N-1:0] a, b, s;
  dr_t         ci, co;
  int   cyc = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dr_rca4 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dr_t drive(int k, ev_t e);
    return '{one: (k == e.t) && e.v, zero: (k == e.t) && !e.v};
  endfunction

  task automatic add_once(int av, int bv, bit msb_first);
    ev_t ea[], eb[], es[], eci, eco;
    int  got_t [N+1];
    bit  got_v [N+1];
    int  endt, last_out, last_in, sum, res;
    ea = new[N]; eb = new[N];
    last_in = 0;
    for (int i = 0; i < N; i++) begin
      int slot;
      slot = msb_first ? (N - 1 - i) : i;
      ea[i].t = SLOT * slot;            ea[i].v = av[i];
      eb[i].t = SLOT * slot + SLOT / 2; eb[i].v = bv[i];
      if (eb[i].t > last_in) last_in = eb[i].t;
    end
    eci.t = 0; eci.v = 1'b0;
    eco = rca(ea, eb, eci, SPLIT_T_OUT_DEFAULT, AND_T_OUT_DEFAULT,
              XOR_T_OUT_DEFAULT, AND_T_OUT_DEFAULT, es);
    endt = eco.t;
    for (int i = 0; i < N; i++) if (es[i].t > endt) endt = es[i].t;
    endt += 4;
    for (int i = 0; i <= N; i++) begin got_t[i] = -1; got_v[i] = 0; end
    for (int k = 0; k <= endt; k++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = drive(k, ea[i]);
        b[i] = drive(k, eb[i]);
      end
      ci = drive(k, eci);
      for (int i = 0; i <= N; i++) begin
        dr_t o;
        o = (i == N) ? co : s[i];
        if (o.one | o.zero) begin
          checks++;
          if (got_t[i] >= 0) begin failures++; $display("extra pulse on output %0d", i); end
          got_t[i] = k; got_v[i] = o.one;
        end
      end
      @(negedge clk);
    end
    sum = av + bv;
    res = 0;
    last_out = 0;
    for (int i = 0; i <= N; i++) begin
      int exp_t;
      exp_t = (i == N) ? eco.t : es[i].t;
      res |= int'(got_v[i]) << i;
      checks++;
      if (got_t[i] != exp_t) begin
        failures++;
        $display("output bit %0d at step %0d, expected %0d", i, got_t[i], exp_t);
      end
      if (got_t[i] > last_out) last_out = got_t[i];
    end
    checks++;
    if (res != sum) begin
      failures++;
      $display("A=%b B=%b: sum %b expected %b", 4'(av), 4'(bv), 5'(res), 5'(sum));
    end
    $display("A=%b B=%b %s: sum=%b, delay %0d ps (last input to last output %0d ps)",
             4'(av), 4'(bv), msb_first ? "msb-first" : "lsb-first", 5'(res),
             last_out, last_out - last_in);
  endtask

  initial begin
    int pa [NPAT] = '{4'b1011, 4'b0111, 4'b1010, 4'b0000, 4'b1111, 4'b1111};
    int pb [NPAT] = '{4'b0111, 4'b1011, 4'b0101, 4'b0000, 4'b0000, 4'b1111};
    a = '0; b = '0; ci = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    add_once(4'b1011, 4'b0111, 1'b1);
    for (int p = 0; p < NPAT; p++) add_once(pa[p], pb[p], 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
