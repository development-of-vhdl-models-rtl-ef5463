// tb_dr_rca4: end-to-end testbench of the dual-rail ripple-carry adder at
// its default size and cell delays.
//
// Every combination of the two 4-bit operands and the carry in (512) is
// added several times, with different arrival schedules: least significant
// bits first, most significant bits first, all inputs in one time step, and
// random times. For each addition the testbench checks that every sum bit
// and the carry out pulse exactly once, on the rail of the correct value
// (checked against integer addition), at the time step the reference timing
// model gives. It counts the mechanisms of the asynchronous circuit and
// fails if one never occurred: each arrival order at the gates (first input
// a, first input b, both together), a carry rippling through all bits, and
// each schedule.
module tb_dr_rca4;
  import dr_pkg::*;
  import dr_ref_pkg::*;

  localparam int N = 4;
  localparam int SLOT = 40;   // spacing of the input time slots (steps)

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dr_t [N-1:0] a, b, s;
  dr_t         ci, co;
  int   cyc = 0;
  int   checks = 0, failures = 0;
  int   sched_seen [4];
  int   full_ripple = 0;
  int   max_delay = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dr_rca4 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dr_t drive(int k, ev_t e);
    return '{one: (k == e.t) && e.v, zero: (k == e.t) && !e.v};
  endfunction

  // One addition. ta/tb give each operand bit's arrival step, tc the carry's.
  task automatic add_once(int av, int bv, bit cv, int ta[N], int tb[N], int tc);
    ev_t ea[], eb[], es[], eci, eco;
    int  got_t [N+1];
    bit  got_v [N+1];
    bit  got   [N+1];
    int  endt, first_in, last_out, sum;
    ea = new[N]; eb = new[N];
    first_in = tc;
    for (int i = 0; i < N; i++) begin
      ea[i].t = ta[i]; ea[i].v = av[i];
      eb[i].t = tb[i]; eb[i].v = bv[i];
      if (ta[i] < first_in) first_in = ta[i];
      if (tb[i] < first_in) first_in = tb[i];
    end
    eci.t = tc; eci.v = cv;
    eco = rca(ea, eb, eci, SPLIT_T_OUT_DEFAULT, AND_T_OUT_DEFAULT,
              XOR_T_OUT_DEFAULT, AND_T_OUT_DEFAULT, es);
    endt = eco.t;
    for (int i = 0; i < N; i++) if (es[i].t > endt) endt = es[i].t;
    endt += 4;
    for (int i = 0; i <= N; i++) begin got[i] = 0; got_t[i] = 0; got_v[i] = 0; end
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
          if (got[i] || (o.one && o.zero)) begin
            failures++;
            $display("extra pulse on output %0d", i);
          end
          got[i] = 1; got_t[i] = k; got_v[i] = o.one;
        end
      end
      @(negedge clk);
    end
    sum = av + bv + int'(cv);
    last_out = 0;
    for (int i = 0; i <= N; i++) begin
      int exp_t;
      exp_t = (i == N) ? eco.t : es[i].t;
      checks += 2;
      if (!got[i] || got_v[i] != sum[i]) begin
        failures++;
        if (failures < 20)
          $display("%0d+%0d+%0d: output bit %0d value %0b (seen %0b), expected %0b",
                   av, bv, cv, i, got_v[i], got[i], sum[i]);
      end
      if (got_t[i] != exp_t) begin
        failures++;
        if (failures < 20)
          $display("%0d+%0d+%0d: output bit %0d at step %0d, expected %0d",
                   av, bv, cv, i, got_t[i], exp_t);
      end
      if (got_t[i] > last_out) last_out = got_t[i];
    end
    if (last_out - first_in > max_delay) max_delay = last_out - first_in;
    if (((av ^ bv) & ((1 << N) - 1)) == (1 << N) - 1) full_ripple++;
  endtask

  initial begin
    int ta[N], tb[N], tc;
    a = '0; b = '0; ci = '0;
    clear_counts();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
      int av, bv;
      bit cv;
      av = v & ((1 << N) - 1);
      bv = (v >> N) & ((1 << N) - 1);
      cv = v[2 * N];
      for (int sched = 0; sched < 4; sched++) begin
        for (int i = 0; i < N; i++) begin
          case (sched)
            0: begin ta[i] = SLOT * i;           tb[i] = SLOT * i + SLOT / 2; end
            1: begin ta[i] = SLOT * (N - 1 - i); tb[i] = SLOT * (N - 1 - i) + SLOT / 2; end
            2: begin ta[i] = 0;                  tb[i] = 0; end
            default: begin
              ta[i] = $urandom_range(0, SLOT * N);
              tb[i] = $urandom_range(0, SLOT * N);
            end
          endcase
        end
        case (sched)
          0, 2:    tc = 0;
          1:       tc = SLOT * N;
          default: tc = $urandom_range(0, SLOT * N);
        endcase
        add_once(av, bv, cv, ta, tb, tc);
        sched_seen[sched]++;
      end
    end
    for (int o = 0; o < 3; o++) begin
      checks++;
      if (order_seen[o] == 0) begin
        failures++;
        $display("arrival order %0d never exercised", o);
      end
    end
    for (int sc = 0; sc < 4; sc++) begin
      checks++;
      if (sched_seen[sc] == 0) begin
        failures++;
        $display("schedule %0d never run", sc);
      end
    end
    checks++;
    if (full_ripple == 0) begin
      failures++;
      $display("no carry rippled through all bits");
    end
    $display("gate evaluations: a-first %0d, b-first %0d, same-step %0d",
             order_seen[0], order_seen[1], order_seen[2]);
    $display("schedules: lsb-first %0d, msb-first %0d, together %0d, random %0d; full ripple %0d",
             sched_seen[0], sched_seen[1], sched_seen[2], sched_seen[3], full_ripple);
    $display("largest first-input to last-output delay: %0d steps", max_delay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
