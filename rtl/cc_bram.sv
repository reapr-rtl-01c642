// cc_bram: one block RAM holding the character classes of up to 36 STEs.
//
// The RAM is organised as rows x COLS bits; the row address is the input
// symbol and column j is the 256-bit character class of STE (BASE + j), so one
// read returns the class bits of all 36 STEs for that symbol.  An 18 Kb BRAM
// ideally holds 72 such columns, but its closest aspect ratio is 512 x 36, so
// 36 columns are used and the upper 256 rows stay empty; ROWS = 256 rows are
// modelled.
// Timing: synchronous read, like a BRAM: `dout` shows the classes of the
// symbol presented with `en` high, from the next cycle on, and holds while
// `en` is low.  The contents are fixed at configuration (an initial block
// filled from the automaton description in reapr_pkg), which is how an
// FPGA bitstream initialises a BRAM; the cells beyond the last STE are zero.
// Organisation and capacity follow the document; the ROM-style
// initialisation is this design's choice.
module cc_bram
  import reapr_pkg::*;
#(
  parameter aut_cfg_t    CFG  = CFG_FIG1,
  parameter int unsigned BASE = 0,           // first STE stored in column 0
  parameter int unsigned COLS = BRAM_COLS,
  parameter int unsigned ROWS = ALPHABET
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic [$clog2(ROWS)-1:0] addr,
  output logic [COLS-1:0]         dout
);

  logic [COLS-1:0] mem [ROWS];

  initial begin
    cc_t cc;
    for (int r = 0; r < ROWS; r++) mem[r] = '0;
    for (int j = 0; j < COLS; j++) begin
      if (BASE + j < aut_n_states(CFG)) begin
        cc = aut_cc(CFG, BASE + j);
        for (int r = 0; r < ROWS; r++) mem[r][j] = cc[r];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) dout <= mem[addr];
  end

endmodule
