// nfa_ref_pkg: software reference model of an automaton for the testbenches.
//
// Simulates the automaton the way a CPU engine does: it keeps the set of
// states enabled for the next symbol, matches each enabled state against the
// symbol, and walks the successor lists of the matched states to build the
// next enabled set.  Successor lists are built by inverting the predecessor
// description, so the model does not share the hardware's wiring.  It also
// computes the Random Forest vote of a report vector.
package nfa_ref_pkg;
  import reapr_pkg::*;

  class nfa_ref;
    aut_cfg_t cfg;
    int unsigned n;
    cc_t  cc [];
    start_e st [];
    int   succ [][$];
    bit   en [];
    bit   first;

    function new(aut_cfg_t c);
      int src;
      cfg = c;
      n   = aut_n_states(c);
      cc  = new[n];
      st  = new[n];
      succ = new[n];
      en  = new[n];
      for (int i = 0; i < n; i++) begin
        cc[i] = aut_cc(c, i);
        st[i] = aut_start(c, i);
      end
      for (int i = 0; i < n; i++)
        for (int k = 0; k < aut_max_in(c); k++) begin
          src = aut_src(c, i, k);
          if (src >= 0) succ[src].push_back(i);
        end
      reset();
    endfunction

    function void reset();
      for (int i = 0; i < n; i++) en[i] = (st[i] != START_NONE);
      first = 1;
    endfunction

    // Consume one symbol; returns the states that matched it.
    function void step(input logic [7:0] sym, ref bit m []);
      m = new[n];
      for (int i = 0; i < n; i++) m[i] = en[i] && cc[i][sym];
      for (int i = 0; i < n; i++) en[i] = (st[i] == START_ALL);
      for (int i = 0; i < n; i++)
        if (m[i]) foreach (succ[i][j]) en[succ[i][j]] = 1;
      first = 0;
    endfunction

    // Class with most matched reporting states (lowest index on a tie).
    function int vote(ref bit m []);
      int cnt [];
      int best, bi;
      cnt = new[cfg.n_classes];
      for (int r = 0; r < aut_n_reports(cfg); r++)
        if (m[aut_report_state(cfg, r)]) cnt[r % cfg.n_classes]++;
      best = 0; bi = 0;
      for (int k = 0; k < cfg.n_classes; k++)
        if (cnt[k] > best) begin best = cnt[k]; bi = k; end
      return bi;
    endfunction
  endclass

endpackage
