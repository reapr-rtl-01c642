// rf_voter: pipelined on-chip voter of the Random Forest kernel.
//
// Instead of exporting every report bit of the automaton (1,661 per symbol),
// the kernel exports only the class that received the most votes.  The
// report bits arrive grouped into N_CLASS classification vectors; a chain of
// N_CLASS identical `voter_stage`s, stage i counting the ones of vector i,
// carries the best class so far and its count, starting from vote = 0 and
// max = 0.  The result is the index of the class with the highest Hamming
// weight (lowest index on ties, 0 when no report fired), in an 8-bit word.
// Timing: latency N_CLASS cycles, one vote per cycle; `adv` low stalls every
// stage at once.
// The stage chain, the initial vote/max of zero and the 8-bit vote word
// follow the document; the grouping of the reports into vectors of CW bits
// is this design's choice.
module rf_voter
  import reapr_pkg::*;
#(
  parameter int unsigned N_CLASS = RF_CLASSES,
  parameter int unsigned CW      = (RF_REPORTS + RF_CLASSES - 1) / RF_CLASSES,
  localparam int unsigned MAX_W  = $clog2(CW + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       adv,
  input  logic                       in_valid,
  input  logic [N_CLASS-1:0][CW-1:0] c_in,
  output logic                       out_valid,
  output logic [VOTE_W-1:0]          vote,
  output logic [MAX_W-1:0]           max_count
);

  logic [N_CLASS:0]                  v;
  logic [N_CLASS:0][N_CLASS-1:0][CW-1:0] c;
  logic [N_CLASS:0][VOTE_W-1:0]      vt;
  logic [N_CLASS:0][MAX_W-1:0]       mx;

  assign v[0]  = in_valid;
  assign c[0]  = c_in;
  assign vt[0] = '0;
  assign mx[0] = '0;

  for (genvar i = 0; i < N_CLASS; i++) begin : g_stage
    voter_stage #(.N_CLASS(N_CLASS), .CW(CW), .IDX(i), .MAX_W(MAX_W)) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .adv      (adv),
      .in_valid (v[i]),
      .c_in     (c[i]),
      .vote_in  (vt[i]),
      .max_in   (mx[i]),
      .out_valid(v[i+1]),
      .c_out    (c[i+1]),
      .vote_out (vt[i+1]),
      .max_out  (mx[i+1])
    );
  end

  assign out_valid = v[N_CLASS];
  assign vote      = vt[N_CLASS];
  assign max_count = mx[N_CLASS];

endmodule
