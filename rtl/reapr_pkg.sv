// reapr_pkg: shared types, constants and automaton descriptions of the
// REAPR automata engine.
//
// A spatial NFA engine is generated from an automaton description: for every
// state-transition element (STE) its character class (a 256-bit column, one
// bit per input byte), its start mode, and the list of STEs whose outputs
// enable it.  In this RTL the description is not a netlist written out by a
// software generator but a set of constant functions below, selected by an
// `aut_cfg_t` parameter; the engine (nfa_core) elaborates one STE per state
// from them.  Three descriptions are provided:
//   AUT_FIG1 - the three-state example automaton [a] -> [cd] <- [b].
//   AUT_RF   - a Random-Forest-shaped automaton: n_chains chains of
//              chain_len STEs, the last STE of each chain being a reporting
//              state that votes for class (chain % n_classes).  The sizes
//              1,661 x 20 = 33,220 states and 1,661 reports match the
//              ANMLZoo Random Forest kernel; the character classes are byte
//              ranges from a fixed hash, because the trained forest is not
//              part of this design.
//   AUT_TEST - a small randomly wired automaton (fan-in up to 3, both start
//              modes, self loops) used to exercise the engine.
// To map a different automaton, add a kind and extend the functions.
package reapr_pkg;

  localparam int unsigned SYM_W      = 8;    // one 8-bit symbol per cycle
  localparam int unsigned ALPHABET   = 256;  // character class column height
  localparam int unsigned BRAM_COLS  = 36;   // 512x36 BRAM: 36 columns of 256 bits
  localparam int unsigned BRAM_CELLS = 2160; // 18 Kb BRAMs on the target FPGA
  localparam int unsigned RF_CLASSES = 10;   // MNIST digits 0-9
  localparam int unsigned RF_REPORTS = 1661; // reporting states of the RF kernel
  localparam int unsigned RF_CHAIN   = 20;   // 33,220 / 1,661 STEs per report
  localparam int unsigned VOTE_W     = 8;    // vote word: one byte

  typedef logic [SYM_W-1:0]    sym_t;
  typedef logic [ALPHABET-1:0] cc_t;

  // How an STE is activated before/without an enabling predecessor.
  typedef enum logic [1:0] {
    START_NONE = 2'd0,  // only enabled by other STEs
    START_SOD  = 2'd1,  // enabled for the first symbol of a stream
    START_ALL  = 2'd2   // enabled for every symbol
  } start_e;

  typedef enum logic [1:0] {
    AUT_FIG1 = 2'd0,
    AUT_RF   = 2'd1,
    AUT_TEST = 2'd2
  } aut_kind_e;

  typedef struct packed {
    aut_kind_e   kind;
    logic [31:0] n_chains;   // RF: chains (= reports); TEST: number of states
    logic [31:0] chain_len;  // RF: STEs per chain
    logic [31:0] n_classes;  // RF: classes the reports vote for
  } aut_cfg_t;

  localparam aut_cfg_t CFG_FIG1 = '{kind: AUT_FIG1, n_chains: 32'd0, chain_len: 32'd0, n_classes: 32'd1};
  localparam aut_cfg_t CFG_RF   = '{kind: AUT_RF, n_chains: RF_REPORTS, chain_len: RF_CHAIN,
                                    n_classes: RF_CLASSES};

  // 32-bit integer hash used to derive synthetic character classes/edges.
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    return h;
  endfunction

  // Character class accepting the byte range lo..hi (inclusive).
  function automatic cc_t cc_range(input int unsigned lo, input int unsigned hi);
    cc_t upto_hi, below_lo;
    upto_hi  = (hi >= 255) ? '1 : ((cc_t'(1) << (hi + 1)) - cc_t'(1));
    below_lo = (cc_t'(1) << lo) - cc_t'(1);
    return upto_hi & ~below_lo;
  endfunction

  function automatic int unsigned aut_n_states(input aut_cfg_t c);
    case (c.kind)
      AUT_FIG1: return 3;
      AUT_RF:   return int'(c.n_chains) * int'(c.chain_len);
      default:  return int'(c.n_chains);
    endcase
  endfunction

  // Largest fan-in (number of enabling predecessors) of any STE.
  function automatic int unsigned aut_max_in(input aut_cfg_t c);
    case (c.kind)
      AUT_FIG1: return 2;
      AUT_RF:   return 1;
      default:  return 3;
    endcase
  endfunction

  // k-th enabling predecessor of STE i, or -1 if there is none.
  function automatic int aut_src(input aut_cfg_t c, input int unsigned i, input int unsigned k);
    logic [31:0] h;
    case (c.kind)
      AUT_FIG1: return (i == 2) ? int'(k) : -1;        // [a] and [b] enable [cd]
      AUT_RF:   return ((k == 0) && (i % c.chain_len != 0)) ? int'(i) - 1 : -1;
      default: begin
        h = mix32(i * 4 + k + 32'h1234);
        if (k == 0 && i % 5 == 2) return int'(i);     // self loop
        if (h[31:30] == 2'b11) return -1;
        return int'({8'd0, h[23:0]} % c.n_chains);
      end
    endcase
  endfunction

  function automatic start_e aut_start(input aut_cfg_t c, input int unsigned i);
    case (c.kind)
      AUT_FIG1: return (i < 2) ? START_ALL : START_NONE;
      AUT_RF:   return (i % c.chain_len == 0) ? START_ALL : START_NONE;
      default:  return (i % 7 == 0) ? START_ALL : ((i % 11 == 1) ? START_SOD : START_NONE);
    endcase
  endfunction

  function automatic cc_t aut_cc(input aut_cfg_t c, input int unsigned i);
    logic [31:0] h;
    h = mix32(i);
    case (c.kind)
      AUT_FIG1: begin
        case (i)
          0:       return cc_range(32'h61, 32'h61);          // 'a'
          1:       return cc_range(32'h62, 32'h62);          // 'b'
          default: return cc_range(32'h63, 32'h64);          // 'c','d'
        endcase
      end
      AUT_RF:  return cc_range(32'(h[5:0]), 32'(h[5:0]) + 32'd160 + 32'(h[12:8]));
      default: return cc_range(32'(h[6:0]), 32'(h[6:0]) + 32'd40 + 32'(h[14:8]) % 32'd88);
    endcase
  endfunction

  function automatic int unsigned aut_n_reports(input aut_cfg_t c);
    case (c.kind)
      AUT_FIG1: return 1;
      AUT_RF:   return c.n_chains;
      default:  return c.n_chains / 4;
    endcase
  endfunction

  // STE index of the r-th reporting state.
  function automatic int unsigned aut_report_state(input aut_cfg_t c, input int unsigned r);
    case (c.kind)
      AUT_FIG1: return 2;
      AUT_RF:   return r * c.chain_len + c.chain_len - 1;
      default:  return r * 4 + 3;
    endcase
  endfunction

endpackage
