// tb_cc_bram: reads every symbol row of two class RAMs (a full one and a
// partly used last one) and compares each column with the character class
// of its STE; also checks that the output holds while the read enable is low
// and appears one cycle after the address.
module tb_cc_bram;
  import reapr_pkg::*;

  localparam aut_cfg_t CFG = '{kind: AUT_TEST, n_chains: 40, chain_len: 0, n_classes: 1};
  logic clk = 0, en;
  logic [7:0] addr;
  logic [35:0] d0, d1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cc_bram #(.CFG(CFG), .BASE(0))  u0 (.clk, .en, .addr, .dout(d0));
  cc_bram #(.CFG(CFG), .BASE(36)) u1 (.clk, .en, .addr, .dout(d1));

  function automatic logic [35:0] expect_row(int base, int sym);
    logic [35:0] v = '0;
    for (int j = 0; j < 36; j++)
      if (base + j < 40) v[j] = aut_cc(CFG, base + j)[sym];
    return v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [35:0] hold0;
    en = 0; addr = 0;
    for (int s = 0; s < 256; s++) begin
      @(negedge clk); en = 1; addr = 8'(s);
      @(negedge clk); en = 0; addr = 8'($urandom);
      checks += 2;
      if (d0 !== expect_row(0, s))  begin failures++; $display("row %0d cell0 %h", s, d0); end
      if (d1 !== expect_row(36, s)) begin failures++; $display("row %0d cell1 %h", s, d1); end
      hold0 = d0;
      @(negedge clk);
      checks++;
      if (d0 !== hold0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
