// tb_dr_half_adder: self-checking testbench of the dual-rail half adder.
//
// Uses a splitter delay and AND/XOR tables that differ from each other and
// entry by entry. Each case sends a and b with random values and arrival
// times and checks that carry and sum each pulse exactly once, on the right
// rail, at the time given by the reference model (splitter delay plus gate
// delay for the arrival order and values).
module tb_dr_half_adder;
  import dr_pkg::*;
  import dr_ref_pkg::*;

  localparam int unsigned TS    = 7;
  localparam delay_tab_t  TAND  = distinct_tab(2);
  localparam delay_tab_t  TXOR  = distinct_tab(20);
  localparam int          NCASES = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dr_t  a, b, c, s;
  int   cyc = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dr_half_adder #(.T_SPLIT(TS), .T_AND(TAND), .T_XOR(TXOR)) dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c), .s(s));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(bit va, bit vb, int da, int db);
    ev_t ea, eb, ec, es;
    int  ct, st, endt;
    bit  cg, sg, cv, sv;
    ea.t = da; ea.v = va;
    eb.t = db; eb.v = vb;
    half_add(ea, eb, TS, TAND, TXOR, ec, es);
    endt = ((ec.t > es.t) ? ec.t : es.t) + 4;
    cg = 0; sg = 0; ct = 0; st = 0; cv = 0; sv = 0;
    for (int k = 0; k <= endt; k++) begin
      a = '{one: (k == da) && va, zero: (k == da) && !va};
      b = '{one: (k == db) && vb, zero: (k == db) && !vb};
      if (c.one | c.zero) begin
        if (cg) begin failures++; $display("extra carry pulse"); end
        cg = 1; ct = k; cv = c.one;
      end
      if (s.one | s.zero) begin
        if (sg) begin failures++; $display("extra sum pulse"); end
        sg = 1; st = k; sv = s.one;
      end
      @(negedge clk);
    end
    checks += 2;
    if (!cg || ct != ec.t || cv != ec.v) begin
      failures++;
      $display("a=%0b@%0d b=%0b@%0d carry %0b@%0d expected %0b@%0d", va, da, vb, db, cv, ct, ec.v, ec.t);
    end
    if (!sg || st != es.t || sv != es.v) begin
      failures++;
      $display("a=%0b@%0d b=%0b@%0d sum %0b@%0d expected %0b@%0d", va, da, vb, db, sv, st, es.v, es.t);
    end
  endtask

  initial begin
    a = '0; b = '0;
    clear_counts();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < 4; v++) begin
      run_case(v[1], v[0], 0, 3);
      run_case(v[1], v[0], 9, 1);
      run_case(v[1], v[0], 2, 2);
    end
    for (int n = 0; n < NCASES; n++)
      run_case(1'($urandom), 1'($urandom), $urandom_range(0, 25), $urandom_range(0, 25));
    for (int o = 0; o < 3; o++) begin
      checks++;
      if (order_seen[o] == 0) begin
        failures++;
        $display("arrival order %0d never exercised", o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
