// tb_voter_stage: drives stage v_3 with random classification vectors and
// incoming vote/max, and checks one cycle later that the stage took over the
// vote exactly when the popcount of c_3 exceeded max, passed all vectors on,
// and held everything on a stalled cycle.
module tb_voter_stage;
  import reapr_pkg::*;

  localparam int unsigned NC = 10, CW = 167, MW = 8;
  logic clk = 0, rst_n = 0, adv, in_valid, out_valid;
  logic [NC-1:0][CW-1:0] c_in, c_out;
  logic [7:0] vote_in, vote_out;
  logic [MW-1:0] max_in, max_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  voter_stage #(.N_CLASS(NC), .CW(CW), .IDX(3)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, density, wins = 0, keeps = 0;
    logic [7:0] ev; logic [MW-1:0] em; logic [NC-1:0][CW-1:0] ec; logic evd;
    adv = 0; in_valid = 0; c_in = '0; vote_in = 0; max_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      density = $urandom_range(1, 9);
      for (int k = 0; k < int'(NC); k++)
        for (int j = 0; j < int'(CW); j++) c_in[k][j] = ($urandom_range(0, 9) < density);
      vote_in  = 8'($urandom_range(0, 2));
      max_in   = MW'($urandom_range(0, 167));
      in_valid = $urandom_range(0, 1);
      adv      = ($urandom_range(0, 4) != 0);
      w = 0;
      for (int j = 0; j < int'(CW); j++) w += c_in[3][j];
      if (adv) begin
        ev = (w > int'(max_in)) ? 8'd3 : vote_in;
        em = (w > int'(max_in)) ? MW'(w) : max_in;
        ec = c_in; evd = in_valid;
        if (w > int'(max_in)) wins++; else keeps++;
      end else begin
        ev = vote_out; em = max_out; ec = c_out; evd = out_valid;
      end
      @(negedge clk);
      checks++;
      if (vote_out !== ev || max_out !== em || c_out !== ec || out_valid !== evd) begin
        failures++;
        if (failures < 10) $display("t=%0d w=%0d max_in=%0d: vote %0d/%0d max %0d/%0d", t, w, max_in, vote_out, ev, max_out, em);
      end
    end
    checks++;
    if (wins == 0 || keeps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
