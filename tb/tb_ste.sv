// tb_ste: checks one STE of each start mode against the STE rule
// (enabled for the next symbol = OR of incoming matches, or start term;
// match = enabled & class hit) under random stimulus, including clears and
// cycles without a consumed symbol.
module tb_ste;
  import reapr_pkg::*;

  logic clk = 0, rst_n = 0, clear, consume, first, cc_hit;
  logic [1:0] in_match;
  logic [2:0] match;
  int checks = 0, failures = 0;
  bit exp_act [3];
  start_e modes [3] = '{START_NONE, START_SOD, START_ALL};

  always #5 clk = ~clk;

  ste #(.N_IN(2), .START(START_NONE)) u_none (.clk, .rst_n, .clear, .consume, .first,
                                             .in_match, .cc_hit, .match(match[0]));
  ste #(.N_IN(2), .START(START_SOD))  u_sod  (.clk, .rst_n, .clear, .consume, .first,
                                             .in_match, .cc_hit, .match(match[1]));
  ste #(.N_IN(2), .START(START_ALL))  u_all  (.clk, .rst_n, .clear, .consume, .first,
                                             .in_match, .cc_hit, .match(match[2]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; consume = 0; first = 1; cc_hit = 0; in_match = 0;
    foreach (exp_act[i]) exp_act[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clear    = ($urandom_range(0, 40) == 0);
      consume  = !clear && ($urandom_range(0, 3) != 0);
      first    = ($urandom_range(0, 5) == 0);
      in_match = 2'($urandom);
      cc_hit   = $urandom_range(0, 1);
      @(posedge clk);
      for (int i = 0; i < 3; i++) begin
        if (clear) exp_act[i] = 0;
        else if (consume)
          exp_act[i] = (|in_match) || (modes[i] == START_ALL) || (modes[i] == START_SOD && first);
      end
      @(negedge clk);
      cc_hit = $urandom_range(0, 1);
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (match[i] !== (exp_act[i] && cc_hit)) begin
          failures++;
          if (failures < 10) $display("ste mode %0d t=%0d: match %b expected %b", i, t, match[i], exp_act[i] && cc_hit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
