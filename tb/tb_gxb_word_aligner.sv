// tb_gxb_word_aligner - a symbol stream (idle words, then random data) is
// delayed by a random number of bits, as an unaligned deserializer would
// deliver it. After the first comma the aligner must output whole symbols:
// every later 20-bit output must equal two consecutive sent symbols. This is
// repeated for several bit offsets, with a reset in between, and once with a
// bit slip in the middle of the stream (the aligner must follow it).
module tb_gxb_word_aligner;
  import fol_pkg::*;
  logic clk = 0, rst = 1;
  logic [19:0] raw = '0, al;
  logic bsync;
  int checks = 0, failures = 0;

  gxb_word_aligner dut (.clk, .rst, .rx_raw(raw), .rx_aligned(al), .byte_sync(bsync));
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [9:0] syms[$];   // all symbols sent, in order
  logic       bits[$];   // serial bit stream
  logic       rd;

  task automatic add_byte(input logic [7:0] d, input logic k);
    logic [10:0] e;
    e = enc8b10b(d, k, rd); rd = e[10];
    syms.push_back(e[9:0]);
    for (int b = 0; b < 10; b++) bits.push_back(e[b]);
  endtask

  // is w two consecutive sent symbols?
  function automatic logic is_pair(input logic [19:0] w);
    for (int i = 0; i + 1 < syms.size(); i++)
      if (syms[i] == w[9:0] && syms[i+1] == w[19:10]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic run(input int offset, input int slip_at);
    int good, n;
    syms.delete(); bits.delete(); rd = 0;
    for (int i = 0; i < offset; i++) bits.push_back(1'b0);
    for (int i = 0; i < 4; i++) begin add_byte(K28_5, 1); add_byte(K28_0, 1); end
    for (int i = 0; i < 80; i++) add_byte(8'($urandom_range(0, 3) * 8'h11 + 8'h21), 0);
    for (int i = 0; i < 2; i++) begin add_byte(K28_5, 1); add_byte(K28_2, 1); end
    for (int i = 0; i < 60; i++) add_byte(8'($urandom_range(0, 3) * 8'h11 + 8'h21), 0);
    rst = 1; @(posedge clk); @(posedge clk); rst = 0;
    good = 0; n = 0;
    while (bits.size() >= 20) begin
      logic [19:0] w;
      if (n == slip_at) void'(bits.pop_front());  // one bit lost: stream shifts
      for (int b = 0; b < 20; b++) w[b] = bits.pop_front();
      raw <= w;
      @(posedge clk); #1;
      n++;
      if (n > 6 && !(slip_at >= 0 && n > slip_at && n < slip_at + 28)) begin
        checks++;
        if (!bsync || !is_pair(al)) begin failures++; $display("FAIL offset %0d word %0d: %b", offset, n, al); end
        else good++;
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    for (int k = 0; k < 8; k++) run($urandom_range(0, 19), -1);
    run(3, 0); run(17, -1); run(0, -1); run(10, -1);
    run(7, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
