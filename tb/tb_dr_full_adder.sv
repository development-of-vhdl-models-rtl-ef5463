// tb_dr_full_adder: self-checking testbench of the dual-rail full adder.
//
// All eight input combinations, with a, b and the carry in arriving in
// every relative order and also together, plus random cases. The splitter,
// AND, XOR and OR-stage delays are all different and every table entry is
// distinct, so the test checks the wiring of the two half adders and of the
// rail-swapped carry OR, and each lookup, through the exact output times.
module tb_dr_full_adder;
  import dr_pkg::*;
  import dr_ref_pkg::*;

  localparam int unsigned TS    = 6;
  localparam delay_tab_t  TAND  = distinct_tab(3);
  localparam delay_tab_t  TXOR  = distinct_tab(17);
  localparam delay_tab_t  TOR   = distinct_tab(31);
  localparam int          NCASES = 500;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dr_t  a, b, ci, s, co;
  int   cyc = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dr_full_adder #(.T_SPLIT(TS), .T_AND(TAND), .T_XOR(TXOR), .T_OR(TOR)) dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dr_t drive(int k, int t, bit v);
    return '{one: (k == t) && v, zero: (k == t) && !v};
  endfunction

  task automatic run_case(bit va, bit vb, bit vc, int da, int db, int dc);
    ev_t ea, eb, ec, es, eco;
    int  st, cot, endt;
    bit  sg, cog, sv, cov;
    ea.t = da; ea.v = va;
    eb.t = db; eb.v = vb;
    ec.t = dc; ec.v = vc;
    full_add(ea, eb, ec, TS, TAND, TXOR, TOR, es, eco);
    endt = ((es.t > eco.t) ? es.t : eco.t) + 4;
    sg = 0; cog = 0; st = 0; cot = 0; sv = 0; cov = 0;
    for (int k = 0; k <= endt; k++) begin
      a  = drive(k, da, va);
      b  = drive(k, db, vb);
      ci = drive(k, dc, vc);
      if (s.one | s.zero) begin
        if (sg) begin failures++; $display("extra sum pulse"); end
        sg = 1; st = k; sv = s.one;
      end
      if (co.one | co.zero) begin
        if (cog) begin failures++; $display("extra carry pulse"); end
        cog = 1; cot = k; cov = co.one;
      end
      @(negedge clk);
    end
    checks += 4;
    if (!sg || st != es.t) begin
      failures++;
      $display("%0b%0b%0b @%0d,%0d,%0d: sum at %0d expected %0d", va, vb, vc, da, db, dc, st, es.t);
    end
    if (sv != (va ^ vb ^ vc)) begin
      failures++;
      $display("%0b%0b%0b: sum value %0b", va, vb, vc, sv);
    end
    if (!cog || cot != eco.t) begin
      failures++;
      $display("%0b%0b%0b @%0d,%0d,%0d: carry at %0d expected %0d", va, vb, vc, da, db, dc, cot, eco.t);
    end
    if (cov != ((va & vb) | (va & vc) | (vb & vc))) begin
      failures++;
      $display("%0b%0b%0b: carry value %0b", va, vb, vc, cov);
    end
  endtask

  initial begin
    a = '0; b = '0; ci = '0;
    clear_counts();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < 8; v++) begin
      run_case(v[2], v[1], v[0], 0, 10, 40);
      run_case(v[2], v[1], v[0], 40, 10, 0);
      run_case(v[2], v[1], v[0], 5, 5, 5);
      run_case(v[2], v[1], v[0], 0, 0, 70);
    end
    for (int n = 0; n < NCASES; n++)
      run_case(1'($urandom), 1'($urandom), 1'($urandom),
               $urandom_range(0, 60), $urandom_range(0, 60), $urandom_range(0, 60));
    for (int o = 0; o < 3; o++) begin
      checks++;
      if (order_seen[o] == 0) begin
        failures++;
        $display("arrival order %0d never exercised", o);
      end
    end
    $display("orders: a-first %0d, b-first %0d, same-step %0d",
             order_seen[0], order_seen[1], order_seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
