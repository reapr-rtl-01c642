// nfa_core: spatial NFA engine, one STE per automaton state.
//
// Every state of the automaton described by CFG (see reapr_pkg) becomes an
// `ste`; its enable inputs are wired to the outputs of its predecessors, so
// all states evaluate the broadcast symbol in parallel and the engine
// consumes one 8-bit symbol per cycle regardless of how many states are
// active.  Character classes are stored in one of two ways:
//   - BRAM: states 0 .. N_BRAM_CELLS*36-1 take a column of a `cc_bram`, which
//     is addressed by the incoming symbol;
//   - LUT:  the remaining states compare a registered copy of the symbol with
//     their class as logic.
// BRAM is filled first and LUTs take the overflow, so N_BRAM_CELLS = 0 gives
// the all-LUT engine and a large N_BRAM_CELLS the all-BRAM engine.
//
// Interface/timing: when `consume` is high, `sym` is taken; from the next
// cycle `match[i]` tells whether state i matched that symbol, and it holds
// until the next `consume`.  `clear` (one cycle, while not consuming) starts a
// new stream: all STEs inactive, start-of-data states armed.
// STE structure, the two class storages, 36 columns per BRAM, 2,160 BRAMs and
// BRAM-first filling follow the document; the description functions, start
// modes and the clear/consume handshake are this design's own.
module nfa_core
  import reapr_pkg::*;
#(
  parameter aut_cfg_t    CFG        = CFG_FIG1,
  parameter int unsigned N_BRAM_CELLS = BRAM_CELLS,
  localparam int unsigned N         = aut_n_states(CFG)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         consume,
  input  sym_t         sym,
  output logic [N-1:0] match
);

  localparam int unsigned MAX_IN  = aut_max_in(CFG);
  localparam int unsigned N_BRAM  = (N < N_BRAM_CELLS * BRAM_COLS) ? N : N_BRAM_CELLS * BRAM_COLS;
  localparam int unsigned N_CELLS = (N_BRAM + BRAM_COLS - 1) / BRAM_COLS;
  localparam int unsigned GRP     = 1024;
  localparam int unsigned N_GRP   = (N + GRP - 1) / GRP;

  logic         first_q;
  logic [N-1:0] hit;

  // first_q: no symbol consumed yet in this stream.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       first_q <= 1'b1;
    else if (clear)   first_q <= 1'b1;
    else if (consume) first_q <= 1'b0;
  end

  // Character classes held in BRAM.
  for (genvar b = 0; b < N_CELLS; b++) begin : g_bram
    localparam int unsigned LO    = b * BRAM_COLS;
    localparam int unsigned USED  = (N_BRAM - LO < BRAM_COLS) ? N_BRAM - LO : BRAM_COLS;
    logic [BRAM_COLS-1:0] col;
    cc_bram #(.CFG(CFG), .BASE(LO)) u_cc (
      .clk (clk),
      .en  (consume),
      .addr(sym),
      .dout(col)
    );
    assign hit[LO +: USED] = col[USED-1:0];
  end

  // Character classes held in LUTs: registered symbol against a constant class.
  if (N_BRAM < N) begin : g_lut
    sym_t sym_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       sym_q <= '0;
      else if (consume) sym_q <= sym;
    end
    for (genvar g = 0; g < N_GRP; g++) begin : g_grp
      for (genvar l = 0; l < GRP; l++) begin : g_cc
        localparam int unsigned I = g * GRP + l;
        if (I >= N_BRAM && I < N) begin : g_on
          localparam cc_t CC = aut_cc(CFG, I);
          assign hit[I] = CC[sym_q];
        end
      end
    end
  end

  // One STE per state, enables routed from the predecessors.  The loop is
  // split into groups of GRP states to keep each generate loop short.
  for (genvar g = 0; g < N_GRP; g++) begin : g_grp
    for (genvar l = 0; l < GRP; l++) begin : g_ste
      localparam int unsigned I = g * GRP + l;
      if (I < N) begin : g_on
        logic [MAX_IN-1:0] in_match;
        for (genvar k = 0; k < MAX_IN; k++) begin : g_in
          localparam int SRC = aut_src(CFG, I, k);
          if (SRC >= 0) begin : g_edge
            assign in_match[k] = match[SRC];
          end else begin : g_none
            assign in_match[k] = 1'b0;
          end
        end
        ste #(.N_IN(MAX_IN), .START(aut_start(CFG, I))) u_ste (
          .clk     (clk),
          .rst_n   (rst_n),
          .clear   (clear),
          .consume (consume),
          .first   (first_q),
          .in_match(in_match),
          .cc_hit  (hit[I]),
          .match   (match[I])
        );
      end
    end
  end

endmodule
