// tb_axi_read_master: reads buffers from a behavioural AXI memory into a
// FIFO that is drained at a random pace.  Checks every byte against the
// memory contents, that the FIFO never overflows, that no burst crosses a
// 4 KB boundary (the memory model counts violations), and, with an ideal
// memory and a FIFO drained every cycle, that the stream arrives at one byte
// per cycle after the first read latency.
module tb_axi_read_master;
  import axi_pkg::*;

  logic clk = 0, rst_n = 0, start, stall, busy, err;
  addr_t base;
  logic [31:0] n_bytes;
  ax_t ar, aw; logic arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, bvalid, bready;
  r_t r; w_t w; b_t b;
  logic out_valid; data_t out_data;
  logic pop, empty, full; data_t rdata; logic [6:0] count, free;
  int mem_errors; longint cycle;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_read_master #(.BURST_LEN(16), .SPACE_W(7)) dut (
    .clk, .rst_n, .start, .base, .n_bytes, .space(free), .busy, .err,
    .ar, .arvalid, .arready, .r, .rvalid, .rready, .out_valid, .out_data);
  sync_fifo #(.W(8), .DEPTH(64)) u_fifo (
    .clk, .rst_n, .clear(1'b0), .push(out_valid), .wdata(out_data), .pop, .rdata, .empty, .full, .count, .free);
  axi_mem_model #(.MEM_BYTES(16384), .RD_LAT(6)) u_mem (
    .clk, .rst_n, .stall, .ar, .arvalid, .arready, .r, .rvalid, .rready,
    .aw, .awvalid(1'b0), .awready, .w, .wvalid(1'b0), .wready, .b, .bvalid, .bready(1'b1),
    .errors(mem_errors), .cycle);

  always @(posedge clk) if (out_valid && full) begin failures++; $display("FIFO overflow"); end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int b0, input int n, input bit stalls);
    int got = 0; longint t0, t_first = 0;
    @(negedge clk);
    stall = stalls; base = addr_t'(b0); n_bytes = n; start = 1;
    t0 = cycle;
    @(negedge clk); start = 0;
    while (got < n) begin
      pop = stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      if (pop && !empty) begin
        checks++;
        if (got == 0) t_first = cycle;
        if (rdata !== u_mem.mem[b0 + got]) begin
          failures++;
          if (failures < 10) $display("byte %0d: %h expected %h", got, rdata, u_mem.mem[b0 + got]);
        end
        got++;
      end
      @(negedge clk);
    end
    pop = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (busy || err) begin failures++; $display("busy %b err %b after run", busy, err); end
    if (!stalls) begin
      checks++;
      if (cycle - t_first > n + 8) begin failures++; $display("slow: %0d cycles for %0d bytes", cycle - t_first, n); end
    end
  endtask

  initial begin
    start = 0; stall = 0; base = 0; n_bytes = 0; pop = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = 8'($urandom);
    rst_n = 1;
    run(100, 1000, 0);
    run(4096 - 21, 300, 1);      // crosses a 4 KB boundary
    run(8190, 3, 1);
    run(5000, 2000, 0);
    checks++;
    if (mem_errors != 0) begin failures++; $display("memory saw %0d protocol errors", mem_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
