// voter_stage: one stage v_i of the pipelined Random Forest voter.
//
// The stage receives the ten classification vectors c_0..c_9 (the report
// bits of the automaton grouped by the class they vote for), the vote chosen
// so far and its vote count `max`.  It takes the Hamming weight w of its own
// vector c_IDX; if w > max it replaces the vote with IDX and max with w,
// otherwise both pass unchanged.  All vectors are passed on to the next stage.
// A strict comparison means ties keep the lower class index.
// Timing: every output is registered, so a stage adds one cycle of latency;
// the stage advances when `adv` is high and holds otherwise (pipeline stall),
// accepting one set of vectors per cycle.
// The stage function follows the document; the valid bit, the `adv` stall
// input, the reset and the widths of `max` are this design's choice.
module voter_stage
  import reapr_pkg::*;
#(
  parameter int unsigned N_CLASS = RF_CLASSES,
  parameter int unsigned CW      = (RF_REPORTS + RF_CLASSES - 1) / RF_CLASSES,
  parameter int unsigned IDX     = 0,
  parameter int unsigned MAX_W   = $clog2(CW + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           adv,
  input  logic                           in_valid,
  input  logic [N_CLASS-1:0][CW-1:0]     c_in,
  input  logic [VOTE_W-1:0]              vote_in,
  input  logic [MAX_W-1:0]               max_in,
  output logic                           out_valid,
  output logic [N_CLASS-1:0][CW-1:0]     c_out,
  output logic [VOTE_W-1:0]              vote_out,
  output logic [MAX_W-1:0]               max_out
);

  logic [MAX_W-1:0] w;
  logic             wins;

  assign w    = MAX_W'($countones(c_in[IDX]));
  assign wins = (w > max_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      c_out     <= '0;
      vote_out  <= '0;
      max_out   <= '0;
    end else if (adv) begin
      out_valid <= in_valid;
      c_out     <= c_in;
      vote_out  <= wins ? VOTE_W'(IDX) : vote_in;
      max_out   <= wins ? w : max_in;
    end
  end

endmodule
