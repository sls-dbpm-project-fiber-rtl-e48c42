// tb_mc_rx - marked half-word pairs become 32-bit words; unmarked strays are
// dropped, a new mark restarts a word, and a full output FIFO drops the word
// with an overflow pulse.
module tb_mc_rx;
  import fol_pkg::*;
  logic clk = 0, rst = 1, iv = 0, ir, owen, ofull = 0, ovf;
  rx_half_t id = '0;
  logic [31:0] ow;
  int checks = 0, failures = 0, novf = 0;
  logic [31:0] exp_q[$];
  mc_rx dut (.clk, .rst, .in_valid(iv), .in_data(id), .in_ready(ir), .out_wen(owen), .out_word(ow), .out_full(ofull), .overflow(ovf));
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (!rst) begin
    if (owen) begin
      checks++;
      if (exp_q.size() == 0 || ow !== exp_q[0]) begin failures++; $display("FAIL word %h exp %h", ow, exp_q.size() ? exp_q[0] : 0); end
      else void'(exp_q.pop_front());
    end
    if (ovf) novf++;
  end
  task automatic half(input logic m, input logic [15:0] v);
    @(negedge clk); id = '{mark32: m, data: v}; iv = 1; @(posedge clk); #1 iv = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 100; i++) begin
      logic [31:0] x;
      int kind;
      x = $urandom; kind = $urandom_range(0, 9);
      if (kind == 0) half(0, 16'hDEAD);                 // stray low half: dropped
      if (kind == 1) half(1, 16'hBEEF);                 // lone high half: replaced
      exp_q.push_back(x);
      half(1, x[31:16]);
      if ($urandom_range(0, 1)) @(posedge clk);
      half(0, x[15:0]);
    end
    // full output FIFO
    ofull <= 1;
    half(1, 16'h1111); half(0, 16'h2222);
    @(posedge clk); @(posedge clk);
    ofull <= 0;
    checks++; if (novf != 1) begin failures++; $display("FAIL overflow pulses %0d", novf); end
    repeat (3) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL missing %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
