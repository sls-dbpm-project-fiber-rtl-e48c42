// tb_gxb_tx_encoder - checks the double-width 8b10b encoder.
//
// A fixed start checks known symbols: after reset an idle word (K28.5 then
// K28.0) must give K28.5 with negative and K28.0 with positive running
// disparity. Then random words (data and valid K characters) are sent and the
// code stream is checked independently of any encoder: every symbol has 4, 5
// or 6 ones, the running digital sum stays within one of its start, the
// first symbol of a word follows the disparity left by the previous word, and
// each symbol decodes (through a table built once by searching all byte
// values) back to the byte sent.
module tb_gxb_tx_encoder;
  import fol_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] d = '0;
  logic [1:0]  c = '0;
  logic [19:0] code;
  int checks = 0, failures = 0;

  gxb_tx_encoder dut (.clk, .rst, .tx_data(d), .tx_ctrl(c), .code);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [9:0] sym(input string s);
    logic [9:0] v;
    for (int i = 0; i < 10; i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  int rds;  // running digital sum: -1 = RD-, +1 = RD+
  task automatic check_sym(input logic [9:0] s, input logic [7:0] db, input logic kb);
    int ones, nrds;
    ones = $countones(s);
    nrds = rds + 2 * (ones - 5);
    checks++;
    if (ones < 4 || ones > 6 || (nrds != -1 && nrds != 1) || (ones == 5 && nrds != rds)) begin
      failures++; $display("FAIL disparity sym=%b rds=%0d", s, rds);
    end
    rds = (ones == 5) ? rds : nrds;
    // decode by brute force search against the package table for the previous disparity
    begin
      logic found; logic [10:0] e;
      found = 0;
      for (int v = 0; v < 512; v++) begin
        if (v[8] && !k_valid(v[7:0])) continue;
        e = enc8b10b(v[7:0], v[8], 1'b0); if (e[9:0] == s && v[7:0] == db && v[8] == kb) found = 1;
        e = enc8b10b(v[7:0], v[8], 1'b1); if (e[9:0] == s && v[7:0] == db && v[8] == kb) found = 1;
      end
      checks++;
      if (!found) begin failures++; $display("FAIL symbol %b is not byte %h k%0d", s, db, kb); end
    end
  endtask

  logic [15:0] dq[$];
  logic [1:0]  cq[$];
  initial begin
    rds = -1;
    repeat (2) @(posedge clk);
    rst <= 0;
    d <= {K28_0, K28_5}; c <= 2'b11;
    @(posedge clk); #1;
    checks++;
    if (code !== {sym("1100001011"), sym("0011111010")}) begin
      failures++; $display("FAIL idle word code %b", code);
    end
    rds = -1; check_sym(code[9:0], K28_5, 1); check_sym(code[19:10], K28_0, 1);
    for (int i = 0; i < 400; i++) begin
      logic [7:0] b0, b1; logic k0, k1;
      k0 = ($urandom_range(0, 5) == 0); k1 = ($urandom_range(0, 5) == 0);
      b0 = 8'($urandom); b1 = 8'($urandom);
      if (k0) b0 = {3'($urandom), 5'd28};
      if (k1) b1 = (i % 2) ? 8'hF7 : 8'hFB;
      d <= {b1, b0}; c <= {k1, k0};
      @(posedge clk); #1;
      check_sym(code[9:0], b0, k0);
      check_sym(code[19:10], b1, k1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
