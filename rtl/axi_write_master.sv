// axi_write_master: drains n_bytes bytes from a FIFO into global memory.
//
// After `start` it writes the bytes to `base` upwards with AXI4 INCR bursts
// of one-byte beats (up to BURST_LEN, never across a 4 KB boundary).  A
// burst address is issued only once the FIFO holds all of its bytes beyond
// those claimed by earlier bursts (`avail` is the FIFO count), so the W beats
// of a burst are sent back to back.  The lengths of issued bursts wait in a
// small queue for the W channel, letting the next address go out while the
// current data is still being written.  `busy` falls when every burst has
// been answered on the B channel; `err` records a non-OKAY response.
// Writing the results to global memory over AXI is the document's; the
// burst length, the queue and the error flag are this design's choice.
module axi_write_master
  import axi_pkg::*;
#(
  parameter int unsigned BURST_LEN = 16,
  parameter int unsigned AVAIL_W   = 7,
  parameter int unsigned LENQ      = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  addr_t              base,
  input  logic [31:0]        n_bytes,
  input  logic [AVAIL_W-1:0] avail,
  input  data_t              in_data,
  output logic               in_pop,
  output logic               busy,
  output logic               err,
  // AXI4 write address / data / response channels
  output ax_t                aw,
  output logic               awvalid,
  input  logic               awready,
  output w_t                 w,
  output logic               wvalid,
  input  logic               wready,
  input  b_t                 b,
  input  logic               bvalid,
  output logic               bready
);

  localparam int unsigned QCW = $clog2(LENQ + 1);

  addr_t       addr_q;
  logic [31:0] rem_issue, reserved, b_pending;
  logic [8:0]  beats, wlen, wcnt;
  logic        issue, wbeat, wlast, bbeat;
  logic        lq_empty, lq_full;
  logic [QCW-1:0] lq_count, lq_free;

  assign beats = burst_beats(addr_q, rem_issue, 9'(BURST_LEN));
  assign issue = busy && !awvalid && (rem_issue != '0) && !lq_full &&
                 ({{(32-AVAIL_W){1'b0}}, avail} >= reserved + {23'd0, beats});

  sync_fifo #(.W(9), .DEPTH(LENQ)) u_lenq (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(start),
    .push (issue),
    .wdata(beats),
    .pop  (wbeat && wlast),
    .rdata(wlen),
    .empty(lq_empty),
    .full (lq_full),
    .count(lq_count),
    .free (lq_free)
  );

  assign wvalid = busy && !lq_empty && (avail != '0);
  assign wlast  = (wcnt == wlen - 9'd1);
  assign w      = '{data: in_data, strb: 1'b1, last: wlast};
  assign wbeat  = wvalid && wready;
  assign in_pop = wbeat;
  assign bready = 1'b1;
  assign bbeat  = bvalid && bready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      err       <= 1'b0;
      awvalid   <= 1'b0;
      aw        <= '0;
      addr_q    <= '0;
      rem_issue <= '0;
      reserved  <= '0;
      b_pending <= '0;
      wcnt      <= '0;
    end else if (start) begin
      busy      <= 1'b1;
      err       <= 1'b0;
      awvalid   <= 1'b0;
      addr_q    <= base;
      rem_issue <= n_bytes;
      reserved  <= '0;
      b_pending <= '0;
      wcnt      <= '0;
    end else begin
      if (awvalid && awready) awvalid <= 1'b0;
      if (issue) begin
        awvalid   <= 1'b1;
        aw        <= '{addr: addr_q, len: 8'(beats - 9'd1), size: SIZE_1B, burst: BURST_INCR};
        addr_q    <= addr_q + ADDR_W'(beats);
        rem_issue <= rem_issue - 32'(beats);
      end
      reserved  <= reserved + (issue ? 32'(beats) : 32'd0) - (wbeat ? 32'd1 : 32'd0);
      b_pending <= b_pending + (issue ? 32'd1 : 32'd0) - (bbeat ? 32'd1 : 32'd0);
      if (wbeat) wcnt <= wlast ? 9'd0 : wcnt + 9'd1;
      if (bbeat && b.resp != RESP_OKAY) err <= 1'b1;
      if (busy && rem_issue == '0 && !awvalid && lq_empty && b_pending == '0) busy <= 1'b0;
    end
  end

  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                awvalid && !awready |=> awvalid && $stable(aw));
  a_w_stable:  assert property (@(posedge clk) disable iff (!rst_n)
                                wvalid && !wready |=> wvalid && $stable(w));

endmodule
