// tb_reapr_rf_top_full: one complete kernel run at the default size.
//
// The kernel is instantiated with every parameter at its default: the
// Random-Forest-shaped automaton of 1,661 chains x 20 STEs (33,220 states,
// 1,661 reporting states in 10 classes), character classes in BRAM.  The
// testbench processes a buffer of 1,500 random symbols through a
// behavioural AXI memory and compares each output vote with the software
// reference automaton, and checks that the run keeps one symbol per cycle.
module tb_reapr_rf_top_full;
  import reapr_pkg::*;
  import axi_pkg::*;
  import nfa_ref_pkg::*;

  localparam int N_SYM = 1500;

  logic clk = 0, rst_n = 0, stall = 0;
  logic ap_start, ap_idle, ap_done, ap_err;
  addr_t in_addr, out_addr;
  logic [31:0] n_symbols;
  ax_t ar, aw; r_t r; w_t w; b_t b;
  logic arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, bvalid, bready;
  int mem_errors; longint cycle;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reapr_rf_top dut (
    .clk, .rst_n, .ap_start, .in_addr, .out_addr, .n_symbols, .ap_idle, .ap_done, .ap_err,
    .m_axi_ar(ar), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_r(r), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .m_axi_aw(aw), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_w(w), .m_axi_wvalid(wvalid), .m_axi_wready(wready),
    .m_axi_b(b), .m_axi_bvalid(bvalid), .m_axi_bready(bready));

  axi_mem_model #(.MEM_BYTES(8192), .RD_LAT(8)) u_mem (
    .clk, .rst_n, .stall, .ar, .arvalid, .arready, .r, .rvalid, .rready,
    .aw, .awvalid, .awready, .w, .wvalid, .wready, .b, .bvalid, .bready,
    .errors(mem_errors), .cycle);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nfa_ref ref_m;
    bit m [];
    int v, nonzero = 0;
    longint t0, t1;
    ref_m = new(CFG_RF);
    ap_start = 0; in_addr = 0; out_addr = 4096; n_symbols = N_SYM;
    for (int i = 0; i < N_SYM; i++) u_mem.mem[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); ap_start = 1; t0 = cycle;
    @(negedge clk); ap_start = 0;
    while (!ap_done) @(negedge clk);
    t1 = cycle;
    for (int i = 0; i < N_SYM; i++) begin
      ref_m.step(u_mem.mem[i], m);
      v = ref_m.vote(m);
      if (v != 0) nonzero++;
      checks++;
      if (int'(u_mem.mem[4096 + i]) != v) begin
        failures++;
        if (failures < 10) $display("vote[%0d] = %0d, expected %0d", i, u_mem.mem[4096 + i], v);
      end
    end
    $display("%0d symbols in %0d cycles, %0d non-zero votes", N_SYM, t1 - t0, nonzero);
    checks += 3;
    if (t1 - t0 > N_SYM + 64) failures++;
    if (nonzero == 0) failures++;
    if (ap_err || mem_errors != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
