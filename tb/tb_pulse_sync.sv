// tb_pulse_sync - every source pulse (spaced apart) appears as exactly one
// destination pulse, within three destination clocks.
module tb_pulse_sync;
  logic sclk = 0, dclk = 0, rst = 1, sp = 0, dp;
  int checks = 0, failures = 0, sent = 0, got = 0;
  pulse_sync dut (.src_clk(sclk), .src_rst(rst), .src_pulse(sp), .dst_clk(dclk), .dst_rst(rst), .dst_pulse(dp));
  always #6.5 sclk = ~sclk;
  always #10 dclk = ~dclk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge dclk) if (dp && !rst) got++;
  initial begin
    repeat (3) @(posedge dclk);
    rst = 0;
    for (int i = 0; i < 50; i++) begin
      int g0;
      @(posedge sclk); sp <= 1; @(posedge sclk); sp <= 0; sent++;
      g0 = got;
      repeat (4) @(posedge dclk);
      checks++;
      if (got != g0 + 1) begin failures++; $display("FAIL pulse %0d: %0d seen", i, got - g0); end
      repeat ($urandom_range(0, 5)) @(posedge sclk);
    end
    checks++; if (got != sent) begin failures++; $display("FAIL total %0d of %0d", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
