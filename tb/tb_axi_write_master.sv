// tb_axi_write_master: feeds bytes into a FIFO at a random pace and lets the
// write master store them through a behavioural AXI memory that stalls at
// random.  Checks the written bytes, that nothing around the buffer is
// touched, that WLAST and 4 KB rules hold (counted by the memory model), and
// with no stalls that the data goes out at one byte per cycle.
module tb_axi_write_master;
  import axi_pkg::*;

  logic clk = 0, rst_n = 0, start, stall, busy, err;
  addr_t base;
  logic [31:0] n_bytes;
  ax_t ar, aw; logic arvalid, arready, rvalid, awvalid, awready, wvalid, wready, bvalid, bready;
  r_t r; w_t w; b_t b;
  logic push, empty, full, in_pop; data_t wdata, rdata; logic [6:0] count, free;
  int mem_errors; longint cycle;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sync_fifo #(.W(8), .DEPTH(64)) u_fifo (
    .clk, .rst_n, .clear(1'b0), .push, .wdata, .pop(in_pop), .rdata, .empty, .full, .count, .free);
  axi_write_master #(.BURST_LEN(16), .AVAIL_W(7)) dut (
    .clk, .rst_n, .start, .base, .n_bytes, .avail(count), .in_data(rdata), .in_pop, .busy, .err,
    .aw, .awvalid, .awready, .w, .wvalid, .wready, .b, .bvalid, .bready);
  axi_mem_model #(.MEM_BYTES(16384), .RD_LAT(2)) u_mem (
    .clk, .rst_n, .stall, .ar('0), .arvalid(1'b0), .arready, .r, .rvalid, .rready(1'b1),
    .aw, .awvalid, .awready, .w, .wvalid, .wready, .b, .bvalid, .bready,
    .errors(mem_errors), .cycle);

  assign arvalid = 1'b0;
  assign ar = '0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pattern(int i, int seed);
    return 8'((i * 37 + seed * 11 + (i >> 3)) ^ seed);
  endfunction

  task automatic run(input int b0, input int n, input bit stalls, input int seed);
    int sent = 0; longint t0, t1;
    @(negedge clk);
    stall = stalls; base = addr_t'(b0); n_bytes = n; start = 1;
    @(negedge clk); start = 0;
    t0 = cycle;
    while (busy) begin
      push = (sent < n) && !full && (stalls ? ($urandom_range(0, 2) != 0) : 1'b1);
      wdata = pattern(sent, seed);
      @(posedge clk);
      if (push) sent++;
      @(negedge clk);
    end
    push = 0;
    t1 = cycle;
    for (int i = -20; i < n + 20; i++) begin
      checks++;
      if (u_mem.mem[b0 + i] !== ((i >= 0 && i < n) ? pattern(i, seed) : 8'h00)) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h", b0 + i, u_mem.mem[b0 + i]);
      end
    end
    for (int i = 0; i < n; i++) u_mem.mem[b0 + i] = 8'h00;
    checks++;
    if (err || !empty) begin failures++; $display("err %b empty %b", err, empty); end
    if (!stalls) begin
      checks++;
      if (t1 - t0 > n + 24) begin failures++; $display("slow: %0d cycles for %0d bytes", t1 - t0, n); end
    end
  endtask

  initial begin
    start = 0; stall = 0; base = 0; n_bytes = 0; push = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(200, 1000, 0, 1);
    run(4096 - 7, 300, 1, 2);     // crosses a 4 KB boundary
    run(9000, 5, 1, 3);
    run(10000, 1500, 0, 4);
    checks++;
    if (mem_errors != 0) begin failures++; $display("memory saw %0d protocol errors", mem_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
