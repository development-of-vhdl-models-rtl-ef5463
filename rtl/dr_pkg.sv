// dr_pkg: types and default timing shared by the dual-rail RSFQ cell models.
//
// The cells model Rapid Single Flux Quantum (RSFQ) logic, where a bit is a
// short voltage pulse rather than a level. In dual-rail coding every logical
// signal has two lines: a pulse on `one` means logical 1, a pulse on `zero`
// means logical 0, and no pulse means "not yet arrived". The models are
// clocked by a time-step clock: one clock cycle stands for one picosecond, the
// resolution at which the cell delays are given, and a pulse is a signal that
// is high for exactly one cycle.
//
// A two-input dual-rail gate waits for both inputs, so its output delay can
// depend on which input came last and on the input values. The gates take
// that as a table, indexed [arrival order][{a value, b value}], in cycles.
// The splitter delay of 11 ps is the cell value for the splitter. The
// 20 ps used by default for every AND and XOR entry is this design's own
// placeholder: real values come from analog simulation of the cells and are
// meant to be passed in as parameters.
package dr_pkg;

  // One dual-rail signal: a pulse on exactly one of the two lines per datum.
  typedef struct packed {
    logic one;   // pulse here = logical 1
    logic zero;  // pulse here = logical 0
  } dr_t;

  // Which input of a two-input gate arrived first. ORD_SAME: both inputs
  // arrived in the same time step.
  typedef enum logic [1:0] {
    ORD_A_FIRST = 2'd0,
    ORD_B_FIRST = 2'd1,
    ORD_SAME    = 2'd2
  } order_e;

  localparam int unsigned N_ORDER = 3;
  localparam int unsigned DELAY_W = 8;  // delays up to 255 time steps

  typedef logic [DELAY_W-1:0] delay_t;
  // Output delay per arrival order and per input values {a, b}.
  typedef delay_t [N_ORDER-1:0][3:0] delay_tab_t;

  // A table with the same delay for every order and every input pattern.
  function automatic delay_tab_t uniform_tab(input delay_t d);
    delay_tab_t t;
    for (int o = 0; o < int'(N_ORDER); o++)
      for (int v = 0; v < 4; v++)
        t[o][v] = d;
    return t;
  endfunction

  // Largest entry of a table: sets the depth of the gate's output delay line.
  function automatic int unsigned tab_max(input delay_tab_t t);
    int unsigned m = 1;
    for (int o = 0; o < int'(N_ORDER); o++)
      for (int v = 0; v < 4; v++)
        if (int'(t[o][v]) > int'(m)) m = int'(t[o][v]);
    return m;
  endfunction

  // Smallest entry of a table (a delay of 0 is not allowed).
  function automatic int unsigned tab_min(input delay_tab_t t);
    int unsigned m = 255;
    for (int o = 0; o < int'(N_ORDER); o++)
      for (int v = 0; v < 4; v++)
        if (int'(t[o][v]) < int'(m)) m = int'(t[o][v]);
    return m;
  endfunction

  localparam int unsigned SPLIT_T_OUT_DEFAULT = 11;
  localparam delay_tab_t  AND_T_OUT_DEFAULT   = uniform_tab(delay_t'(20));
  localparam delay_tab_t  XOR_T_OUT_DEFAULT   = uniform_tab(delay_t'(20));

endpackage
