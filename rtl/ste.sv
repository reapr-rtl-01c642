// ste: state-transition element, the hardware form of one automaton state.
//
// An STE merges an NFA state with the transition that enters it (a
// homogeneous automaton): it is active for a symbol when at least one of its
// predecessors matched the previous symbol (or it is a start state), and it
// matches when it is active and the symbol is in its character class.
//   en_next = OR(in_match) | start term      (reduction OR of enables)
//   act_q   <= en_next  on every consumed symbol (the activation DFF)
//   match   = act_q & cc_hit                 (AND with the class lookup)
// The character class itself lives outside (LUT or BRAM column in nfa_core);
// `cc_hit` is its bit for the symbol currently held in the engine.
//
// Timing: `consume` advances the engine by one symbol.  `match` refers to the
// symbol consumed last and is valid in the cycle after `consume`.  `first`
// is high until the first symbol of a stream has been consumed, so a
// start-of-data STE is enabled for exactly that symbol; `clear` starts a new
// stream by deactivating the STE.
// The register/OR/AND structure follows the document's translation
// algorithm; the start modes (start-of-data, all-input) and the clear input
// are this design's choice.
module ste
  import reapr_pkg::*;
#(
  parameter int unsigned N_IN  = 1,          // fan-in: number of enabling STEs
  parameter start_e      START = START_NONE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,             // new stream: deactivate
  input  logic            consume,           // a symbol is consumed this cycle
  input  logic            first,             // the symbol consumed now is the first
  input  logic [N_IN-1:0] in_match,          // outputs of enabling STEs
  input  logic            cc_hit,            // class bit for the held symbol
  output logic            match
);

  logic act_q;
  logic en_next;

  always_comb begin
    en_next = |in_match;
    if (START == START_ALL) en_next = 1'b1;
    if (START == START_SOD && first) en_next = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       act_q <= 1'b0;
    else if (clear)   act_q <= 1'b0;
    else if (consume) act_q <= en_next;
  end

  assign match = act_q & cc_hit;

endmodule
