// tb_rx_sync_combiner - feeds decoded byte streams to the 16-bit word
// synchroniser, with the word boundary both right and one byte off.
// Checked: link_stable only after a control word and cleared by an 8b10b
// error; half words stored in order with the 32-bit mark only after a marker;
// idle/stop/marker words not stored; remote_stop follows stop/idle words;
// the error counter counts error clocks and saturates; the byte slip count.
module tb_rx_sync_combiner;
  import fol_pkg::*;
  logic clk = 0, rst = 1, bsync = 0, full = 0;
  logic [15:0] d = '0;
  logic [1:0]  c = '0, e = '0;
  logic wen, stable, rstop, lost;
  rx_half_t wd;
  logic [7:0] ecnt, egray;
  int checks = 0, failures = 0, slips = 0;

  rx_sync_combiner dut (.clk, .rst, .byte_sync(bsync), .rx_data(d), .rx_ctrl(c), .rx_err(e),
    .fifo_wen(wen), .fifo_wdata(wd), .fifo_full(full), .link_stable(stable), .remote_stop(rstop),
    .lost(lost), .err_count(ecnt), .err_count_gray(egray));
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // byte-level source with optional one byte offset
  logic [7:0] bq[$]; logic kq[$]; logic eq[$];
  rx_half_t exp_q[$];

  task automatic push_word(input fol_word_t w);
    bq.push_back(w.data[7:0]);  kq.push_back(w.ctrl[0]); eq.push_back(1'b0);
    bq.push_back(w.data[15:8]); kq.push_back(w.ctrl[1]); eq.push_back(1'b0);
  endtask

  always @(posedge clk) begin
    if (wen) begin
      checks++;
      if (exp_q.size() == 0 || wd !== exp_q[0]) begin
        failures++; $display("FAIL stored %h mark %0d", wd.data, wd.mark32);
      end else void'(exp_q.pop_front());
    end
  end

  task automatic drain();
    while (bq.size() >= 2) begin
      d <= {bq[1], bq[0]}; c <= {kq[1], kq[0]}; e <= {eq[1], eq[0]};
      repeat (2) begin void'(bq.pop_front()); void'(kq.pop_front()); void'(eq.pop_front()); end
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0; bsync <= 1;
    for (int off = 0; off < 2; off++) begin
      bq.delete(); kq.delete(); eq.delete();
      if (off) begin bq.push_back(8'h55); kq.push_back(0); eq.push_back(0); end
      for (int i = 0; i < 4; i++) push_word(W_IDLE);
      drain(); @(posedge clk); #1;
      checks++; if (!stable || rstop) begin failures++; $display("FAIL off %0d: not stable after idles (%0d %0d)", off, stable, rstop); end
      // data: markers and half words
      for (int i = 0; i < 20; i++) begin
        logic [31:0] w;
        w = $urandom;
        push_word(W_SYNC32); push_word('{ctrl: 2'b00, data: w[31:16]}); push_word('{ctrl: 2'b00, data: w[15:0]});
        exp_q.push_back('{mark32: 1'b1, data: w[31:16]}); exp_q.push_back('{mark32: 1'b0, data: w[15:0]});
        if (i % 5 == 0) push_word(W_IDLE);
      end
      push_word(W_STOP); push_word(W_STOP);
      drain(); repeat (3) @(posedge clk); #1;
      checks++; if (!rstop) begin failures++; $display("FAIL stop word ignored"); end
      checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d half words missing", exp_q.size()); end
      push_word(W_IDLE); push_word(W_IDLE); drain(); repeat (3) @(posedge clk); #1;
      checks++; if (rstop) begin failures++; $display("FAIL idle word does not clear stop"); end
      // an error drops the stable state, data then is not stored
      push_word('{ctrl: 2'b00, data: 16'h1234}); eq[eq.size()-1] = 1'b1;
      push_word('{ctrl: 2'b00, data: 16'h5678});
      drain(); repeat (2) @(posedge clk); #1;
      checks++; if (stable || !rstop) begin failures++; $display("FAIL error kept link stable"); end
      push_word(W_IDLE); push_word(W_IDLE); drain(); repeat (2) @(posedge clk); #1;
      checks++; if (!stable) begin failures++; $display("FAIL not stable again"); end
    end
    // error counter
    begin
      logic [7:0] c0;
      c0 = ecnt;
      e <= 2'b01; repeat (10) @(posedge clk); e <= 2'b00; @(posedge clk); #1;
      checks++; if (ecnt != c0 + 10) begin failures++; $display("FAIL error count %0d exp %0d", ecnt, c0 + 10); end
      checks++; if (egray != (ecnt ^ (ecnt >> 1))) begin failures++; $display("FAIL gray"); end
      e <= 2'b11; repeat (300) @(posedge clk); e <= 2'b00; @(posedge clk); #1;
      checks++; if (ecnt != 8'hFF) begin failures++; $display("FAIL no saturation %0d", ecnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
