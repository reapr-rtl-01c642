// axi_read_master: streams n_bytes bytes from global memory into a FIFO.
//
// After `start` it issues AXI4 INCR read bursts of one-byte beats (up to
// BURST_LEN beats, never across a 4 KB boundary) from `base` upwards, and
// pushes every returned byte to `out_data` with `out_valid`.  A burst is
// requested only when the downstream FIFO has room for it on top of all
// beats already requested (`space` is the FIFO's free count), so R data is
// always accepted (rready stays high) and several bursts can be in flight to
// hide memory latency.  `busy` is high from the cycle after `start` until the
// last byte has arrived; `err` records a non-OKAY response.
// Reading the input buffer over AXI is the document's; the burst length,
// credit scheme and error flag are this design's choice.
module axi_read_master
  import axi_pkg::*;
#(
  parameter int unsigned BURST_LEN = 16,
  parameter int unsigned SPACE_W   = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  addr_t              base,
  input  logic [31:0]        n_bytes,
  input  logic [SPACE_W-1:0] space,
  output logic               busy,
  output logic               err,
  // AXI4 read address / data channels
  output ax_t                ar,
  output logic               arvalid,
  input  logic               arready,
  input  r_t                 r,
  input  logic               rvalid,
  output logic               rready,
  // byte stream out
  output logic               out_valid,
  output data_t              out_data
);

  addr_t       addr_q;
  logic [31:0] rem_issue, rem_recv;
  logic [31:0] outstanding;
  logic [8:0]  beats;
  logic        issue, rbeat;

  assign beats  = burst_beats(addr_q, rem_issue, 9'(BURST_LEN));
  assign issue  = busy && !arvalid && (rem_issue != '0) &&
                  ({{(32-SPACE_W){1'b0}}, space} >= outstanding + {23'd0, beats});
  assign rready = 1'b1;
  assign rbeat  = rvalid && rready;

  assign out_valid = rbeat && busy;
  assign out_data  = r.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      err         <= 1'b0;
      arvalid     <= 1'b0;
      ar          <= '0;
      addr_q      <= '0;
      rem_issue   <= '0;
      rem_recv    <= '0;
      outstanding <= '0;
    end else if (start) begin
      busy        <= 1'b1;
      err         <= 1'b0;
      arvalid     <= 1'b0;
      addr_q      <= base;
      rem_issue   <= n_bytes;
      rem_recv    <= n_bytes;
      outstanding <= '0;
    end else begin
      if (arvalid && arready) arvalid <= 1'b0;
      if (issue) begin
        arvalid   <= 1'b1;
        ar        <= '{addr: addr_q, len: 8'(beats - 9'd1), size: SIZE_1B, burst: BURST_INCR};
        addr_q    <= addr_q + ADDR_W'(beats);
        rem_issue <= rem_issue - 32'(beats);
      end
      outstanding <= outstanding + (issue ? 32'(beats) : 32'd0) - (rbeat ? 32'd1 : 32'd0);
      if (rbeat) begin
        rem_recv <= rem_recv - 32'd1;
        if (r.resp != RESP_OKAY) err <= 1'b1;
      end
      if (busy && rem_recv == '0) busy <= 1'b0;
    end
  end

  // AXI rule: a raised ARVALID stays up, with a stable payload, until ARREADY.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                arvalid && !arready |=> arvalid && $stable(ar));

endmodule
