// tb_nfa_core: runs the engine against the software reference model.
//  - the three-state example automaton on "acbdcad", where [cd] must match
//    exactly at symbols 1, 3 and 6;
//  - an 80-state randomly wired automaton in three storage mixes: all LUT,
//    BRAM for the first 36 states and LUT for the rest, all BRAM; random
//    symbols, random idle cycles and a mid-stream restart.
// Every state's match output is compared after every consumed symbol.
module tb_nfa_core;
  import reapr_pkg::*;
  import nfa_ref_pkg::*;

  localparam aut_cfg_t CFG = '{kind: AUT_TEST, n_chains: 80, chain_len: 0, n_classes: 1};
  localparam int unsigned N = 80;

  logic clk = 0, rst_n = 0, clear, consume;
  sym_t sym;
  logic [N-1:0] m_lut, m_mix, m_bram;
  logic [2:0]   m_fig;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nfa_core #(.CFG(CFG), .N_BRAM_CELLS(0)) u_lut  (.clk, .rst_n, .clear, .consume, .sym, .match(m_lut));
  nfa_core #(.CFG(CFG), .N_BRAM_CELLS(1)) u_mix  (.clk, .rst_n, .clear, .consume, .sym, .match(m_mix));
  nfa_core #(.CFG(CFG), .N_BRAM_CELLS(3)) u_bram (.clk, .rst_n, .clear, .consume, .sym, .match(m_bram));
  nfa_core #(.CFG(CFG_FIG1))             u_fig  (.clk, .rst_n, .clear, .consume, .sym, .match(m_fig));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input sym_t s);
    @(negedge clk); consume = 1; sym = s;
    @(negedge clk); consume = 0; sym = 8'($urandom);
  endtask

  initial begin
    nfa_ref ref_m;
    bit m [];
    string fig_in = "acbdcad";
    bit fig_exp [7] = '{0, 1, 0, 1, 0, 0, 1};
    int total_matches = 0;
    sym_t s;
    ref_m = new(CFG);
    clear = 0; consume = 0; sym = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Example automaton
    for (int i = 0; i < 7; i++) begin
      put(fig_in[i]);
      checks++;
      if (m_fig[2] !== fig_exp[i] || m_fig[0] !== (fig_in[i] == "a") || m_fig[1] !== (fig_in[i] == "b")) begin
        failures++;
        $display("example automaton: symbol %0d '%s' match %b", i, fig_in[i], m_fig);
      end
    end

    // Random automaton, three storage mixes
    for (int t = 0; t < 2000; t++) begin
      if (t == 1000) begin
        @(negedge clk); clear = 1;
        @(negedge clk); clear = 0;
        ref_m.reset();
      end
      if ($urandom_range(0, 3) == 0) @(negedge clk);   // idle cycle
      s = 8'($urandom);
      put(s);
      ref_m.step(s, m);
      for (int i = 0; i < int'(N); i++) begin
        total_matches += m[i];
        checks += 3;
        if (m_lut[i] !== m[i])  begin failures++; if (failures < 10) $display("LUT  t=%0d state %0d", t, i); end
        if (m_mix[i] !== m[i])  begin failures++; if (failures < 10) $display("MIX  t=%0d state %0d", t, i); end
        if (m_bram[i] !== m[i]) begin failures++; if (failures < 10) $display("BRAM t=%0d state %0d", t, i); end
      end
    end
    checks++;
    if (total_matches < 1000) begin failures++; $display("too few matches: %0d", total_matches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
