// tb_reapr_rf_top: end-to-end test of the Random Forest kernel with I/O.
//
// A reduced Random-Forest-shaped automaton (60 chains of 4 STEs, 10 classes)
// is placed with its first 108 states in BRAM and the rest in LUTs.  The
// testbench writes random symbols into a behavioural AXI memory, starts the
// kernel, waits for ap_done and compares every output byte with the vote
// computed by the software reference automaton.  Several runs follow each
// other: an ideal memory (the whole run must take at most n + 64 cycles,
// i.e. one symbol per cycle), a memory that stalls at random (output FIFO
// fills and stalls the pipeline; input FIFO runs dry and inserts bubbles),
// a buffer crossing a 4 KB boundary and a 1-symbol run.
// It counts how often each mechanism occurred and fails if one never did.
module tb_reapr_rf_top;
  import reapr_pkg::*;
  import axi_pkg::*;
  import nfa_ref_pkg::*;

  localparam aut_cfg_t CFG = '{kind: AUT_RF, n_chains: 60, chain_len: 4, n_classes: 10};
  localparam int unsigned N_BRAM = 3 * 36;

  logic clk = 0, rst_n = 0, stall;
  logic ap_start, ap_idle, ap_done, ap_err;
  addr_t in_addr, out_addr;
  logic [31:0] n_symbols;
  ax_t ar, aw; r_t r; w_t w; b_t b;
  logic arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, bvalid, bready;
  int mem_errors; longint cycle;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_stall = 0, n_bubble = 0, n_short_burst = 0, n_bram_match = 0, n_lut_match = 0;
  int n_vote_nonzero = 0, n_no_report = 0, n_tie = 0, n_restart = 0;

  always #5 clk = ~clk;

  reapr_rf_top #(.CFG(CFG), .N_BRAM_CELLS(3)) dut (
    .clk, .rst_n, .ap_start, .in_addr, .out_addr, .n_symbols, .ap_idle, .ap_done, .ap_err,
    .m_axi_ar(ar), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_r(r), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .m_axi_aw(aw), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_w(w), .m_axi_wvalid(wvalid), .m_axi_wready(wready),
    .m_axi_b(b), .m_axi_bvalid(bvalid), .m_axi_bready(bready));

  axi_mem_model #(.MEM_BYTES(65536), .RD_LAT(8)) u_mem (
    .clk, .rst_n, .stall, .ar, .arvalid, .arready, .r, .rvalid, .rready,
    .aw, .awvalid, .awready, .w, .wvalid, .wready, .b, .bvalid, .bready,
    .errors(mem_errors), .cycle);

  always @(posedge clk) if (rst_n && !ap_idle) begin
    if (!dut.adv) n_stall++;
    if (dut.in_empty && dut.rd_busy) n_bubble++;
    if (arvalid && arready && ar.len != 8'd15) n_short_burst++;
    if (dut.m_valid && dut.adv) begin
      for (int i = 0; i < int'(N_BRAM); i++) n_bram_match += dut.match[i];
      for (int i = N_BRAM; i < int'(aut_n_states(CFG)); i++) n_lut_match += dut.match[i];
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  nfa_ref ref_m;

  task automatic run(input int ib, input int ob, input int n, input bit stalls);
    bit m [];
    int v, cnt [10], best, nbest;
    longint t0, t1;
    for (int i = 0; i < n; i++) u_mem.mem[ib + i] = 8'($urandom);
    for (int i = 0; i < n; i++) u_mem.mem[ob + i] = 8'hEE;
    @(negedge clk);
    stall = stalls; in_addr = addr_t'(ib); out_addr = addr_t'(ob); n_symbols = n;
    ap_start = 1;
    t0 = cycle;
    @(negedge clk); ap_start = 0;
    n_restart++;
    while (!ap_done) @(negedge clk);
    t1 = cycle;
    ref_m.reset();
    for (int i = 0; i < n; i++) begin
      ref_m.step(u_mem.mem[ib + i], m);
      v = ref_m.vote(m);
      foreach (cnt[k]) cnt[k] = 0;
      for (int rr = 0; rr < int'(aut_n_reports(CFG)); rr++)
        if (m[aut_report_state(CFG, rr)]) cnt[rr % 10]++;
      best = 0; nbest = 0;
      foreach (cnt[k]) if (cnt[k] > best) best = cnt[k];
      foreach (cnt[k]) if (cnt[k] == best) nbest++;
      if (best == 0) n_no_report++;
      else if (nbest > 1) n_tie++;
      if (v != 0) n_vote_nonzero++;
      checks++;
      if (int'(u_mem.mem[ob + i]) != v) begin
        failures++;
        if (failures < 10) $display("run n=%0d: vote[%0d] = %0d, expected %0d", n, i, u_mem.mem[ob + i], v);
      end
    end
    checks += 2;
    if (u_mem.mem[ob + n] != 8'h00) failures++;   // nothing written past the buffer
    if (ap_err) failures++;
    if (!stalls) begin
      checks++;
      if (t1 - t0 > n + 64) begin failures++; $display("run of %0d symbols took %0d cycles", n, t1 - t0); end
      else $display("run of %0d symbols took %0d cycles", n, t1 - t0);
    end
  endtask

  initial begin
    ref_m = new(CFG);
    stall = 0; ap_start = 0; in_addr = 0; out_addr = 0; n_symbols = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run(0, 32768, 3000, 0);
    run(1000, 40000, 2500, 1);
    run(8192 - 50, 16384 - 30, 700, 1);
    run(20000, 50000, 1, 0);
    run(100, 60000, 1000, 0);
    checks++;
    if (mem_errors != 0) begin failures++; $display("AXI protocol errors: %0d", mem_errors); end
    $display("mechanisms: stall=%0d bubble=%0d short_burst=%0d bram_match=%0d lut_match=%0d",
             n_stall, n_bubble, n_short_burst, n_bram_match, n_lut_match);
    $display("            vote_nonzero=%0d no_report=%0d tie=%0d restart=%0d",
             n_vote_nonzero, n_no_report, n_tie, n_restart);
    checks += 9;
    if (n_stall == 0)        begin failures++; $display("no pipeline stall happened"); end
    if (n_bubble == 0)       begin failures++; $display("no input bubble happened"); end
    if (n_short_burst == 0)  begin failures++; $display("no short burst happened"); end
    if (n_bram_match == 0)   begin failures++; $display("no BRAM-class match happened"); end
    if (n_lut_match == 0)    begin failures++; $display("no LUT-class match happened"); end
    if (n_vote_nonzero == 0) begin failures++; $display("no non-zero vote happened"); end
    if (n_no_report == 0)    begin failures++; $display("no empty vote happened"); end
    if (n_tie == 0)          begin failures++; $display("no tie happened"); end
    if (n_restart < 2)       begin failures++; $display("no restart happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
