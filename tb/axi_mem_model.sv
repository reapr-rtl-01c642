// axi_mem_model: behavioural AXI4 slave standing in for the board's global
// memory in simulation (not synthesizable).
//
// A byte array of MEM_BYTES bytes behind an 8-bit AXI4 port.  Read bursts
// are queued and answered RD_LAT cycles after their address was accepted,
// in order; write bursts are applied as their beats arrive and answered on B.
// With `stall` high, every ready/valid the model drives is withheld on
// random cycles to exercise back-pressure.  `errors` counts protocol
// violations it sees (nothing is accepted while rst_n is low): a burst crossing 4 KB, a wrong WLAST, an address
// outside the array.  Testbenches access `mem` hierarchically.
module axi_mem_model
  import axi_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 65536,
  parameter int unsigned RD_LAT    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,
  input  ax_t         ar,
  input  logic        arvalid,
  output logic        arready,
  output r_t          r,
  output logic        rvalid,
  input  logic        rready,
  input  ax_t         aw,
  input  logic        awvalid,
  output logic        awready,
  input  w_t          w,
  input  logic        wvalid,
  output logic        wready,
  output b_t          b,
  output logic        bvalid,
  input  logic        bready,
  output int          errors,
  output longint      cycle
);

  logic [7:0] mem [MEM_BYTES];

  // read address queue
  ax_t    arq   [16];
  longint arq_t [16];
  int     arq_h, arq_t_, r_beat;
  logic   r_go, ar_go, aw_go, w_go, b_go;

  // write address queue
  ax_t    awq [16];
  int     awq_h, awq_t, w_beat, b_cnt;

  initial begin
    for (int i = 0; i < int'(MEM_BYTES); i++) mem[i] = 8'h00;
    arq_h = 0; arq_t_ = 0; r_beat = 0; awq_h = 0; awq_t = 0; w_beat = 0; b_cnt = 0;
    errors = 0; cycle = 0;
    r_go = 1; ar_go = 1; aw_go = 1; w_go = 1; b_go = 1;
  end

  function automatic bit crosses_4k(ax_t a);
    return (a.addr[11:0] + {4'd0, a.len}) > 13'h0FFF;
  endfunction

  assign arready = rst_n && ar_go && (arq_t_ - arq_h < 16);
  assign rvalid  = r_go && (arq_h != arq_t_) && (cycle >= arq_t[arq_h % 16] + RD_LAT);
  always_comb begin
    r = '0;
    if (arq_h != arq_t_) begin
      r.data = mem[(arq[arq_h % 16].addr + r_beat) % MEM_BYTES];
      r.last = (r_beat == int'(arq[arq_h % 16].len));
    end
  end

  assign awready = rst_n && aw_go && (awq_t - awq_h < 16);
  assign wready  = rst_n && w_go && (awq_h != awq_t);
  assign bvalid  = b_go && (b_cnt > 0);
  assign b       = '{resp: RESP_OKAY};

  always @(posedge clk) begin
    cycle <= cycle + 1;
    r_go  <= stall ? ($urandom_range(0, 3) != 0) : 1'b1;
    ar_go <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
    aw_go <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
    w_go  <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
    b_go  <= stall ? ($urandom_range(0, 1) != 0) : 1'b1;
    if (arvalid && arready) begin
      if (crosses_4k(ar) || ar.addr + ar.len >= MEM_BYTES) errors <= errors + 1;
      arq[arq_t_ % 16]   <= ar;
      arq_t[arq_t_ % 16] <= cycle;
      arq_t_ <= arq_t_ + 1;
    end
    if (rvalid && rready) begin
      if (r.last) begin
        r_beat <= 0;
        arq_h  <= arq_h + 1;
      end else r_beat <= r_beat + 1;
    end
    if (awvalid && awready) begin
      if (crosses_4k(aw) || aw.addr + aw.len >= MEM_BYTES) errors <= errors + 1;
      awq[awq_t % 16] <= aw;
      awq_t <= awq_t + 1;
    end
    if (wvalid && wready) begin
      mem[(awq[awq_h % 16].addr + w_beat) % MEM_BYTES] <= w.data;
      if (w.last != (w_beat == int'(awq[awq_h % 16].len))) errors <= errors + 1;
      if (w_beat == int'(awq[awq_h % 16].len)) begin
        w_beat <= 0;
        awq_h  <= awq_h + 1;
      end else w_beat <= w_beat + 1;
    end
    b_cnt <= b_cnt + ((wvalid && wready && w_beat == int'(awq[awq_h % 16].len)) ? 1 : 0)
                   - ((bvalid && bready) ? 1 : 0);
  end

endmodule
