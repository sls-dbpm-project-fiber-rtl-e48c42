// tb_system2dsp - a DSP link-port receiver model samples LDAT on the falling
// edge of the LCLK pin (built with ddr_out, as in the design). Checked: words
// arrive most significant nibble first and in order; a word takes 8 DSP clocks
// at full speed and 16 at half speed; no word starts while LACK is low.
module tb_system2dsp;
  logic clk = 0, rst = 0, fs = 1, empty = 1, ren, lack = 0, lh, ll, busy;
  logic [31:0] head = '0;
  logic [3:0] ld;
  logic lclk_pin;
  logic [3:0] ldat_pin;
  int checks = 0, failures = 0, got = 0;
  logic [31:0] q[$], exp_q[$];

  system2dsp dut (.clk, .rst, .full_speed(fs), .fifo_rdata(head), .fifo_empty(empty), .fifo_ren(ren),
                  .lack_in(lack), .lclk_h(lh), .lclk_l(ll), .ldat(ld), .busy(busy));
  ddr_out #(.W(5)) u_ddr (.clk, .rst, .d_h({lh, ld}), .d_l({ll, ld}), .q({lclk_pin, ldat_pin}));
  always #10 clk = ~clk;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (ren && q.size()) void'(q.pop_front());
  always_comb begin empty = (q.size() == 0); head = empty ? '0 : q[0]; end

  // DSP receiver
  logic [31:0] sh; int nn = 0; realtime t_first;
  realtime t_word[$];
  logic started = 0;
  always @(negedge lclk_pin) if (started) begin
    if (nn == 0) t_first = $realtime;
    sh = {sh[27:0], ldat_pin}; nn++;
    if (nn == 8) begin
      nn = 0; got++;
      t_word.push_back($realtime - t_first);
      checks++;
      if (exp_q.size() == 0 || sh !== exp_q[0]) begin failures++; $display("FAIL word %h", sh); end
      else void'(exp_q.pop_front());
    end
  end

  task automatic run(input logic speed, input int n, input int period);
    fs = speed;
    t_word.delete();
    for (int i = 0; i < n; i++) begin logic [31:0] x; x = $urandom; q.push_back(x); exp_q.push_back(x); end
    wait (exp_q.size() == 0);
    repeat (4) @(posedge clk);
    foreach (t_word[i]) begin
      checks++;
      if (t_word[i] != 7.0 * period * 20) begin failures++; $display("FAIL word time %0t (speed %0d)", t_word[i], speed); end
    end
  endtask

  initial begin
    #1 rst = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    started = 1;
    // LACK low: nothing may be sent
    q.push_back(32'h12345678); exp_q.push_back(32'h12345678);
    repeat (20) @(posedge clk);
    checks++; if (got != 0 || q.size() != 1) begin failures++; $display("FAIL sent while LACK low"); end
    lack = 1;
    run(1, 20, 1);
    run(0, 20, 2);
    run(1, 5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
