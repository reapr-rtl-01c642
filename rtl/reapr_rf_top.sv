// reapr_rf_top: Random Forest automata kernel with its memory I/O.
//
// The host places a buffer of input symbols in the FPGA's global memory and
// starts the kernel with the buffer addresses and length.  The kernel then
// runs a pipeline that handles one symbol per cycle:
//   AXI read  ->  input FIFO  ->  nfa_core (one STE per state)
//     ->  report bits grouped into N_CLASS classification vectors
//     ->  rf_voter (N_CLASS pipelined stages)  ->  output FIFO  ->  AXI write
// and writes one 8-bit vote per input symbol to the output buffer
// (out[i] = class with the most reports after symbol i).  Exporting the vote
// instead of all report bits cuts the output from 1,661 bits to 8 bits per
// symbol, so the output stream is no larger than the input stream.
//
// Flow control: the whole automaton/voter pipeline advances when the output
// FIFO is not full (`adv`) and stalls as one otherwise; the automaton takes a
// symbol whenever it advances and the input FIFO is not empty, and inserts a
// bubble when the input FIFO is empty.  The read master only requests bursts
// the input FIFO can hold, so no data is dropped.
//
// Control (a simple start/done block-level handshake): `ap_start` high while
// `ap_idle` begins a run over `n_symbols` bytes from `in_addr`, results to
// `out_addr`; `ap_done` pulses for one cycle when the last vote write has been
// acknowledged.  Latency from a symbol leaving the input FIFO to its vote
// entering the output FIFO is 1 + N_CLASS cycles.
// The read/automaton/write pipeline, the 8-bit vote and the on-chip
// voting follow the document; FIFO depths, burst length, the control
// handshake and the report-to-class grouping (report r votes for class
// r mod N_CLASS) are this design's choice.
module reapr_rf_top
  import reapr_pkg::*;
  import axi_pkg::*;
#(
  parameter aut_cfg_t    CFG          = CFG_RF,
  parameter int unsigned N_BRAM_CELLS = BRAM_CELLS,
  parameter int unsigned BURST_LEN    = 16,
  parameter int unsigned IN_DEPTH     = 64,
  parameter int unsigned OUT_DEPTH    = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  logic        ap_start,
  input  addr_t       in_addr,
  input  addr_t       out_addr,
  input  logic [31:0] n_symbols,
  output logic        ap_idle,
  output logic        ap_done,
  output logic        ap_err,
  // AXI4 master to global memory
  output ax_t         m_axi_ar,
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  input  r_t          m_axi_r,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready,
  output ax_t         m_axi_aw,
  output logic        m_axi_awvalid,
  input  logic        m_axi_awready,
  output w_t          m_axi_w,
  output logic        m_axi_wvalid,
  input  logic        m_axi_wready,
  input  b_t          m_axi_b,
  input  logic        m_axi_bvalid,
  output logic        m_axi_bready
);

  localparam int unsigned N       = aut_n_states(CFG);
  localparam int unsigned N_REP   = aut_n_reports(CFG);
  localparam int unsigned N_CLASS = CFG.n_classes;
  localparam int unsigned CW      = (N_REP + N_CLASS - 1) / N_CLASS;
  localparam int unsigned MAX_W   = $clog2(CW + 1);
  localparam int unsigned IN_CW   = $clog2(IN_DEPTH + 1);
  localparam int unsigned OUT_CW  = $clog2(OUT_DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;

  logic start;
  logic rd_busy, rd_err, wr_busy, wr_err;

  // ---- control --------------------------------------------------------
  assign start   = (state == S_IDLE) && ap_start;
  assign ap_idle = (state == S_IDLE);
  assign ap_done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ap_err <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (ap_start) state <= S_RUN;
        S_RUN:  if (!wr_busy && !rd_busy) begin
                  state  <= S_DONE;
                  ap_err <= rd_err || wr_err;
                end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- input: AXI read -> input FIFO -------------------------------------
  logic           in_push, in_empty, in_full;
  data_t          in_wdata;
  sym_t           in_sym;
  logic [IN_CW-1:0] in_count, in_free;
  logic           adv, consume;

  axi_read_master #(.BURST_LEN(BURST_LEN), .SPACE_W(IN_CW)) u_rd (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .base     (in_addr),
    .n_bytes  (n_symbols),
    .space    (in_free),
    .busy     (rd_busy),
    .err      (rd_err),
    .ar       (m_axi_ar),
    .arvalid  (m_axi_arvalid),
    .arready  (m_axi_arready),
    .r        (m_axi_r),
    .rvalid   (m_axi_rvalid),
    .rready   (m_axi_rready),
    .out_valid(in_push),
    .out_data (in_wdata)
  );

  sync_fifo #(.W(SYM_W), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(start),
    .push (in_push),
    .wdata(in_wdata),
    .pop  (consume),
    .rdata(in_sym),
    .empty(in_empty),
    .full (in_full),
    .count(in_count),
    .free (in_free)
  );

  // ---- automaton ---------------------------------------------------------
  logic         out_full;
  logic [N-1:0] match;
  logic         m_valid;

  assign adv     = !out_full;
  assign consume = adv && !in_empty;

  nfa_core #(.CFG(CFG), .N_BRAM_CELLS(N_BRAM_CELLS)) u_nfa (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (start),
    .consume(consume),
    .sym    (in_sym),
    .match  (match)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     m_valid <= 1'b0;
    else if (start) m_valid <= 1'b0;
    else if (adv)   m_valid <= consume;
  end

  // Report bits grouped into classification vectors: report r is bit
  // r / N_CLASS of the vector of class r % N_CLASS; unused bits are zero.
  logic [N_CLASS-1:0][CW-1:0] cls;
  for (genvar k = 0; k < N_CLASS; k++) begin : g_cls
    for (genvar j = 0; j < CW; j++) begin : g_bit
      if (j * N_CLASS + k < N_REP) begin : g_rep
        assign cls[k][j] = match[aut_report_state(CFG, j * N_CLASS + k)];
      end else begin : g_pad
        assign cls[k][j] = 1'b0;
      end
    end
  end

  // ---- voter -> output FIFO -> AXI write --------------------------------
  logic              v_valid;
  logic [VOTE_W-1:0] v_vote;
  logic [MAX_W-1:0]  v_max;
  logic              out_pop, out_empty;
  data_t             out_rdata;
  logic [OUT_CW-1:0] out_count, out_free;

  rf_voter #(.N_CLASS(N_CLASS), .CW(CW)) u_voter (
    .clk      (clk),
    .rst_n    (rst_n),
    .adv      (adv),
    .in_valid (m_valid),
    .c_in     (cls),
    .out_valid(v_valid),
    .vote     (v_vote),
    .max_count(v_max)
  );

  sync_fifo #(.W(VOTE_W), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(start),
    .push (adv && v_valid),
    .wdata(v_vote),
    .pop  (out_pop),
    .rdata(out_rdata),
    .empty(out_empty),
    .full (out_full),
    .count(out_count),
    .free (out_free)
  );

  axi_write_master #(.BURST_LEN(BURST_LEN), .AVAIL_W(OUT_CW)) u_wr (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .base   (out_addr),
    .n_bytes(n_symbols),
    .avail  (out_count),
    .in_data(out_rdata),
    .in_pop (out_pop),
    .busy   (wr_busy),
    .err    (wr_err),
    .aw     (m_axi_aw),
    .awvalid(m_axi_awvalid),
    .awready(m_axi_awready),
    .w      (m_axi_w),
    .wvalid (m_axi_wvalid),
    .wready (m_axi_wready),
    .b      (m_axi_b),
    .bvalid (m_axi_bvalid),
    .bready (m_axi_bready)
  );

endmodule
