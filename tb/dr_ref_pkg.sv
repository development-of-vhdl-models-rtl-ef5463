// dr_ref_pkg: reference timing model of the dual-rail RSFQ cells, for the
// testbenches.
//
// Works on events (arrival time in time steps, logical value) instead of
// pulses, and computes what each cell must produce: a splitter adds its
// delay; a two-input gate fires at the later of its two input times plus the
// table entry for (arrival order, input values). The adders are composed
// from these functions the same way the circuit is wired. It also counts,
// over every gate it evaluates, how often each arrival order occurred, so a
// testbench can show that each case of the gate models was exercised.
package dr_ref_pkg;
  import dr_pkg::*;

  typedef struct {
    int t;   // time step of the pulse
    bit v;   // logical value (which rail)
  } ev_t;

  int unsigned order_seen [3];  // indexed by order_e
  int unsigned gate_evals;

  function automatic void clear_counts();
    for (int i = 0; i < 3; i++) order_seen[i] = 0;
    gate_evals = 0;
  endfunction

  function automatic int order_of(ev_t a, ev_t b);
    if (a.t < b.t) return 0;      // a first
    if (b.t < a.t) return 1;      // b first
    return 2;                     // same time step
  endfunction

  // kind: 0 = AND, 1 = XOR, 2 = OR built as AND with swapped rails.
  function automatic ev_t gate(ev_t a, ev_t b, delay_tab_t tab, int kind);
    ev_t y;
    bit  ga, gb, r;
    int  o;
    ga = (kind == 2) ? !a.v : a.v;
    gb = (kind == 2) ? !b.v : b.v;
    o  = order_of(a, b);
    case (kind)
      0:       r = ga & gb;
      1:       r = ga ^ gb;
      default: r = !(ga & gb);
    endcase
    y.t = ((a.t > b.t) ? a.t : b.t) + int'(tab[o][{ga, gb}]);
    y.v = r;
    order_seen[o]++;
    gate_evals++;
    return y;
  endfunction

  function automatic ev_t split(ev_t a, int unsigned ts);
    ev_t y = a;
    y.t = a.t + int'(ts);
    return y;
  endfunction

  function automatic void half_add(ev_t a, ev_t b, int unsigned ts,
                                   delay_tab_t t_and, delay_tab_t t_xor,
                                   output ev_t c, output ev_t s);
    ev_t as, bs;
    as = split(a, ts);
    bs = split(b, ts);
    c  = gate(as, bs, t_and, 0);
    s  = gate(as, bs, t_xor, 1);
  endfunction

  function automatic void full_add(ev_t a, ev_t b, ev_t ci, int unsigned ts,
                                   delay_tab_t t_and, delay_tab_t t_xor,
                                   delay_tab_t t_or,
                                   output ev_t s, output ev_t co);
    ev_t c1, s1, c2;
    half_add(a, b, ts, t_and, t_xor, c1, s1);
    half_add(s1, ci, ts, t_and, t_xor, c2, s);
    co = gate(c1, c2, t_or, 2);
  endfunction

  // Ripple-carry adder of a.size() bits: bit i is a full adder whose carry
  // in is bit i-1's carry out (ci for bit 0). s receives the sum bits and
  // the carry out is returned.
  function automatic ev_t rca(ev_t a[], ev_t b[], ev_t ci, int unsigned ts,
                              delay_tab_t t_and, delay_tab_t t_xor,
                              delay_tab_t t_or, ref ev_t s[]);
    ev_t c;
    c = ci;
    s = new[a.size()];
    for (int i = 0; i < a.size(); i++)
      full_add(a[i], b[i], c, ts, t_and, t_xor, t_or, s[i], c);
    return c;
  endfunction

  // A table whose entries all differ: base + 4*order + {a,b}.
  function automatic delay_tab_t distinct_tab(int base);
    delay_tab_t t;
    for (int o = 0; o < 3; o++)
      for (int v = 0; v < 4; v++)
        t[o][v] = delay_t'(base + 4 * o + v);
    return t;
  endfunction

endpackage
