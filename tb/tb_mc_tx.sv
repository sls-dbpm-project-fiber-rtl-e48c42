// tb_mc_tx - each DSP word must become marker, high half, low half in the
// transmitter FIFO, at one entry per clock, and must wait while the FIFO is
// full.
module tb_mc_tx;
  import fol_pkg::*;
  logic clk = 0, rst = 1, wv = 0, wr, fwen, ffull = 0;
  logic [31:0] w = '0;
  fol_word_t fwd;
  int checks = 0, failures = 0, nwords = 0, cycles = 0;
  fol_word_t exp_q[$];
  mc_tx dut (.clk, .rst, .word_valid(wv), .word(w), .word_ready(wr), .fifo_wen(fwen), .fifo_wdata(fwd), .fifo_full(ffull));
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (!rst) begin
    if (fwen) begin
      checks++;
      if (ffull || exp_q.size() == 0 || fwd !== exp_q[0]) begin failures++; $display("FAIL entry %h", fwd); end
      else void'(exp_q.pop_front());
    end
    if (wv && wr) begin
      nwords++;
      wv <= 0;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    // back to back, no back pressure: 3 clocks per word
    for (int i = 0; i < 10; i++) begin
      logic [31:0] x;
      x = $urandom;
      exp_q.push_back(W_SYNC32); exp_q.push_back('{2'b00, x[31:16]}); exp_q.push_back('{2'b00, x[15:0]});
      w <= x; wv <= 1;
      cycles = 0;
      do begin @(posedge clk); cycles++; end while (!(wv && wr));
      checks++; if (cycles != 3) begin failures++; $display("FAIL word took %0d clocks", cycles); end
      #1;
    end
    // with random back pressure
    fork
      forever begin @(posedge clk); ffull <= ($urandom_range(0, 2) == 0); end
    join_none
    for (int i = 0; i < 50; i++) begin
      logic [31:0] x;
      x = $urandom;
      @(posedge clk);
      exp_q.push_back(W_SYNC32); exp_q.push_back('{2'b00, x[31:16]}); exp_q.push_back('{2'b00, x[15:0]});
      w <= x; wv <= 1;
      do @(posedge clk); while (!(wv && wr));
      #1;
    end
    repeat (3) @(posedge clk);
    checks++; if (exp_q.size() != 0 || nwords != 60) begin failures++; $display("FAIL left %0d words %0d", exp_q.size(), nwords); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
