// tb_dr_xor: self-checking testbench of the dual-rail XOR gate.
//
// The gate gets a delay table whose twelve entries all differ, so a wrong
// arrival-order or input-value lookup shows up as a wrong output time. Each
// case sends one pulse on a and one on b (random values, random offsets
// including the same time step), then checks that exactly one output pulse
// comes, on the right rail, exactly at the time the reference model gives.
// Every arrival order and every input pattern is counted and must occur.
module tb_dr_xor;
  import dr_pkg::*;
  import dr_ref_pkg::*;

  localparam delay_tab_t TAB    = distinct_tab(5);
  localparam int         NCASES = 600;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dr_t  a, b, y;
  int   cyc = 0;
  int   checks = 0, failures = 0;
  int   pattern_seen [4];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dr_xor #(.T_OUT(TAB)) dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .y(y));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(bit va, bit vb, int da, int db);
    ev_t ea, eb, ey;
    int  last, got_t, k;
    bit  got, got_v;
    ea.t = da; ea.v = va;
    eb.t = db; eb.v = vb;
    ey   = gate(ea, eb, TAB, 1);
    pattern_seen[{va, vb}]++;
    last = (da > db) ? da : db;
    got = 0; got_t = 0; got_v = 0;
    for (k = 0; k <= ey.t + 4; k++) begin
      a = '{one: (k == da) && va, zero: (k == da) && !va};
      b = '{one: (k == db) && vb, zero: (k == db) && !vb};
      if (y.one | y.zero) begin
        if (got || (y.one && y.zero)) begin
          failures++;
          $display("extra output pulse at step %0d", k);
        end
        got = 1; got_t = k; got_v = y.one;
      end
      @(negedge clk);
    end
    checks++;
    if (!got || got_t != ey.t || got_v != ey.v) begin
      failures++;
      if (failures < 10)
        $display("a=%0b@%0d b=%0b@%0d: got %0b@%0d (seen=%0b), expected %0b@%0d",
                 va, da, vb, db, got_v, got_t, got, ey.v, ey.t);
    end
    if (got_t - last < 1 && got) begin
      failures++;
      $display("output before the later input");
    end
  endtask

  initial begin
    a = '0; b = '0;
    clear_counts();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // All patterns in all three orders first, then random cases.
    for (int v = 0; v < 4; v++) begin
      run_case(v[1], v[0], 0, 5);
      run_case(v[1], v[0], 7, 2);
      run_case(v[1], v[0], 4, 4);
    end
    for (int n = 0; n < NCASES; n++)
      run_case(1'($urandom), 1'($urandom), $urandom_range(0, 30), $urandom_range(0, 30));
    for (int o = 0; o < 3; o++) begin
      checks++;
      if (order_seen[o] == 0) begin
        failures++;
        $display("arrival order %0d never exercised", o);
      end
    end
    for (int v = 0; v < 4; v++) begin
      checks++;
      if (pattern_seen[v] == 0) begin
        failures++;
        $display("input pattern %0d never exercised", v);
      end
    end
    $display("orders: a-first %0d, b-first %0d, same-step %0d",
             order_seen[0], order_seen[1], order_seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
