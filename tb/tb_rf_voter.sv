// tb_rf_voter: streams random classification vectors through the full
// ten-stage voter with random stall cycles and compares every vote with the
// class of largest popcount (lowest index on a tie, 0 if all are empty).
// With no stalls, a vote must come out exactly 10 cycles after its vectors
// went in, one vote per cycle.
module tb_rf_voter;
  import reapr_pkg::*;

  localparam int unsigned NC = 10, CW = 167;
  logic clk = 0, rst_n = 0, adv, in_valid, out_valid;
  logic [NC-1:0][CW-1:0] c_in;
  logic [7:0] vote;
  logic [7:0] max_count;
  int checks = 0, failures = 0;
  int exp_q [$];
  int exp_max_q [$];
  longint cyc = 0, in_cyc_q [$];
  bit stalls = 1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  rf_voter dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: compare at each advancing edge.
  always @(posedge clk) if (rst_n && adv && out_valid) begin
    checks++;
    if (exp_q.size() == 0) failures++;
    else begin
      if (int'(vote) != exp_q[0] || int'(max_count) != exp_max_q[0]) begin
        failures++;
        if (failures < 10) $display("vote %0d/%0d max %0d/%0d", vote, exp_q[0], max_count, exp_max_q[0]);
      end
      if (in_cyc_q[0] >= 0) begin
        checks++;
        if (cyc - in_cyc_q[0] != 10) begin failures++; $display("latency %0d", cyc - in_cyc_q[0]); end
      end
      void'(exp_q.pop_front()); void'(exp_max_q.pop_front()); void'(in_cyc_q.pop_front());
    end
  end

  initial begin
    int cnt [NC];
    int best, bi, ties = 0, zeros = 0;
    adv = 1; in_valid = 0; c_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t == 1500) stalls = 0;
      adv = stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      in_valid = (t < 2900) && (stalls ? $urandom_range(0, 1) : 1);
      for (int k = 0; k < int'(NC); k++) begin
        cnt[k] = 0;
        for (int j = 0; j < int'(CW); j++) begin
          c_in[k][j] = (t % 7 == 0) ? 1'b0 : ($urandom_range(0, 99) < 3 + (k % 3));
          cnt[k] += c_in[k][j];
        end
      end
      if (t % 11 == 0) begin c_in[5] = c_in[2]; cnt[5] = cnt[2]; end  // force ties
      best = 0; bi = 0;
      for (int k = 0; k < int'(NC); k++) if (cnt[k] > best) begin best = cnt[k]; bi = k; end
      for (int k = bi + 1; k < int'(NC); k++) if (cnt[k] == best && best > 0) ties++;
      if (best == 0) zeros++;
      if (adv && in_valid) begin
        exp_q.push_back(bi); exp_max_q.push_back(best); in_cyc_q.push_back(stalls ? -1 : cyc);
      end
    end
    @(negedge clk); in_valid = 0; adv = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || ties == 0 || zeros == 0) begin
      failures++; $display("left %0d ties %0d zeros %0d", exp_q.size(), ties, zeros);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
