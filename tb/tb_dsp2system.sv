// tb_dsp2system - a DSP link-port transmitter model sends 32-bit words as
// nibbles (new nibble on the rising LCLK edge, most significant first) and
// waits for LACK before each word. Checked: the words come out in order, LACK
// stays low while tx_allow is low, LACK falls when the system side stops
// taking words (nibble FIFO filling) and no nibble is lost.
module tb_dsp2system;
  logic lclk = 0, sclk = 0, sys = 0, rst = 0, allow = 0, ready = 0;
  logic [3:0] ldat = '0;
  logic lack, wv;
  logic [31:0] w;
  int checks = 0, failures = 0, sent = 0, got = 0, lack_drops = 0;
  logic [31:0] exp_q[$];

  dsp2system #(.NIB_AW(6), .LACK_MARGIN(24)) dut (.lclk, .ldat, .sclk, .sclk_rst(rst), .lack, .tx_allow(allow),
    .sys_clk(sys), .rst, .word_valid(wv), .word(w), .word_ready(ready));
  always #12.5 sclk = ~sclk;
  always #6.67 sys = ~sys;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // DSP transmitter: LCLK at sclk rate, one word while LACK is high
  task automatic dsp_send(input logic [31:0] x);
    while (!lack) @(posedge sclk);
    for (int i = 7; i >= 0; i--) begin
      @(posedge sclk); lclk <= 1; ldat <= x[4*i +: 4];
      @(negedge sclk); lclk <= 0;
    end
  endtask

  always @(posedge sys) if (!rst) begin
    if (wv && ready) begin
      checks++;
      if (exp_q.size() == 0 || w !== exp_q[0]) begin failures++; $display("FAIL word %h", w); end
      else void'(exp_q.pop_front());
      got++;
    end
  end
  logic lack_q = 0;
  always @(posedge sclk) begin lack_q <= lack; if (lack_q && !lack) lack_drops++; end

  initial begin
    #1 rst = 1;
    repeat (4) @(posedge sclk);
    rst = 0;
    repeat (10) @(posedge sclk);
    checks++; if (lack) begin failures++; $display("FAIL LACK high without tx_allow"); end
    allow = 1; ready = 1;
    for (int i = 0; i < 40; i++) begin
      logic [31:0] x; x = $urandom; exp_q.push_back(x); dsp_send(x); sent++;
    end
    // system side stalls: LACK must drop before the FIFO overflows
    ready = 0;
    fork
      for (int i = 0; i < 20; i++) begin
        logic [31:0] x; x = $urandom; exp_q.push_back(x); dsp_send(x); sent++;
      end
      begin repeat (600) @(posedge sclk); ready = 1; end
    join
    repeat (200) @(posedge sys);
    checks++; if (lack_drops == 0) begin failures++; $display("FAIL LACK never dropped"); end
    checks++; if (got != sent || exp_q.size() != 0) begin failures++; $display("FAIL got %0d of %0d", got, sent); end
    // tx_allow low: LACK low within a few clocks
    allow = 0; repeat (5) @(posedge sclk); #1;
    checks++; if (lack) begin failures++; $display("FAIL LACK high after tx_allow low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
