// tb_tx_sync_splitter - the transmitter word source: stop words after reset,
// idle words when the FIFO is empty, FIFO words in order otherwise, and a
// change of the flow-control request sent ahead of pending data. A random
// phase then fills the FIFO and toggles the request at random: data must come
// out complete and in order, and every control word must show the request
// as it was two clocks before, with fc_sent marking exactly the changes.
module tb_tx_sync_splitter;
  import fol_pkg::*;
  logic clk = 0, rst = 1, empty = 1, ren, stop = 1, fc;
  fol_word_t head = '0, txw;
  int checks = 0, failures = 0;
  fol_word_t q[$];
  tx_sync_splitter dut (.clk, .rst, .fifo_rdata(head), .fifo_empty(empty), .fifo_ren(ren), .stop_req(stop), .tx_word(txw), .fc_sent(fc));
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // FIFO model
  always @(posedge clk) if (ren && q.size()) void'(q.pop_front());
  always_comb begin empty = (q.size() == 0); head = empty ? '0 : q[0]; end

  task automatic expect_word(input fol_word_t w, input string what);
    @(posedge clk); #1;
    checks++; if (txw !== w) begin failures++; $display("FAIL %s: got %h/%b", what, txw.data, txw.ctrl); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) expect_word(W_STOP, "stop after reset");
    stop <= 0;
    begin
      int n = 0;
      do begin @(posedge clk); #1; n++; end while (!fc && n < 6);
      checks++; if (n != 3) begin failures++; $display("FAIL ready after %0d clocks", n); end
    end
    checks++; if (txw !== W_IDLE || !fc) begin failures++; $display("FAIL ready not announced"); end
    repeat (3) expect_word(W_IDLE, "idle");
    for (int i = 0; i < 5; i++) q.push_back('{2'b00, 16'(i * 3 + 1)});
    #1;
    for (int i = 0; i < 5; i++) expect_word('{2'b00, 16'(i * 3 + 1)}, "data");
    expect_word(W_IDLE, "idle after data");
    // stop request while data waits: stop word first, then data continues
    for (int i = 0; i < 4; i++) q.push_back('{2'b00, 16'(100 + i)});
    stop <= 1;
    expect_word('{2'b00, 16'd100}, "data 0");
    expect_word('{2'b00, 16'd101}, "data 1");
    expect_word(W_STOP, "stop inserted");
    expect_word('{2'b00, 16'd102}, "data 2");
    expect_word('{2'b00, 16'd103}, "data 3");
    expect_word(W_STOP, "stop as idle");
    begin
      logic h1, h2, st;
      int nexp, npush, nfc;
      h1 = stop; h2 = stop; st = 1; nexp = 0; npush = 0; nfc = 0;
      for (int t = 0; t < 3000; t++) begin
        @(negedge clk);
        if (t < 2900) begin
          if ($urandom_range(0, 9) < 4) begin q.push_back('{2'b00, 16'(16'h4000 + npush)}); npush++; end
          if ($urandom_range(0, 7) == 0) stop = ~stop;
        end else stop = 0;
        @(posedge clk); #1;
        if (txw.ctrl == 2'b00) begin
          checks++;
          if (txw.data !== 16'(16'h4000 + nexp)) begin failures++; $display("FAIL t %0d data %h exp %h", t, txw.data, 16'(16'h4000 + nexp)); end
          nexp++;
          if (fc) begin checks++; failures++; $display("FAIL t %0d fc with data", t); end
        end else begin
          logic ws;
          ws = (txw === W_STOP);
          checks++;
          if (txw !== W_STOP && txw !== W_IDLE) begin failures++; $display("FAIL t %0d odd word %h/%b", t, txw.data, txw.ctrl); end
          else if (fc != (ws != st)) begin failures++; $display("FAIL t %0d fc %b state %b word stop %b", t, fc, st, ws); end
          else if (ws != h2) begin failures++; $display("FAIL t %0d word stop %b request %b", t, ws, h2); end
          if (fc) nfc++;
          st = ws;
        end
        h2 = h1; h1 = stop;
      end
      checks++;
      if (nexp != npush || q.size() != 0) begin failures++; $display("FAIL %0d of %0d data words sent", nexp, npush); end
      checks++;
      if (nfc < 100) begin failures++; $display("FAIL only %0d flow-control changes", nfc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
