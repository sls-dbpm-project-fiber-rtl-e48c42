// tb_irq_error - IRQ1 pulses (active low, IRQ_PULSE clocks) for each lost
// data event and for each stable link that becomes unstable, but not for a
// link becoming stable; IRQ1 falls one clock after the event, an event
// during a pulse extends it, and a random sequence of events is counted.
module tb_irq_error;
  logic clk = 0, rst = 1, ev = 0, irq, evt;
  logic [1:0] ls = 2'b00;
  int checks = 0, failures = 0, npulse = 0, low = 0, maxlow = 0;
  irq_error #(.NLINK(2), .IRQ_PULSE(4)) dut (.clk, .rst, .err_evt(ev), .link_stable(ls), .irq1_n(irq), .evt);
  always #10 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic irq_q = 1;
  always @(posedge clk) if (!rst) begin
    irq_q <= irq;
    if (irq_q && !irq) npulse++;
    if (!irq) begin low++; end else begin if (low > maxlow) maxlow = low; low = 0; end
  end
  task automatic expect_pulses(input int n, input string what);
    repeat (12) @(posedge clk);
    checks++; if (npulse != n) begin failures++; $display("FAIL %s: %0d pulses, expected %0d", what, npulse, n); end
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    expect_pulses(0, "idle");
    ls = 2'b11; expect_pulses(0, "links up");
    @(negedge clk) ev = 1; @(negedge clk) ev = 0; expect_pulses(1, "lost data");
    ls = 2'b10; expect_pulses(2, "link 0 down");
    ls = 2'b00; expect_pulses(3, "link 1 down");
    ls = 2'b01; expect_pulses(3, "link 0 up");
    checks++; if (maxlow != 4) begin failures++; $display("FAIL pulse width %0d", maxlow); end
    // latency: irq1_n low at the first edge after a lost-data pulse
    @(negedge clk) ev = 1; @(posedge clk); #1;
    checks++; if (irq !== 1'b0) begin failures++; $display("FAIL IRQ1 not low one clock after the event"); end
    @(negedge clk) ev = 0; expect_pulses(4, "latency event");
    // an event during a pulse restarts it: one longer pulse
    maxlow = 0;
    @(negedge clk) ev = 1; @(negedge clk) ev = 0; @(negedge clk); @(negedge clk) ev = 1; @(negedge clk) ev = 0;
    expect_pulses(5, "restarted pulse counted once");
    checks++; if (maxlow != 7) begin failures++; $display("FAIL restarted pulse width %0d, expected 7", maxlow); end
    // random sequence of lost data, link loss and link recovery
    begin
      int exp_n;
      exp_n = npulse;
      for (int i = 0; i < 60; i++) begin
        int what;
        what = $urandom_range(0, 2);
        maxlow = 0;
        if (what == 0) begin
          @(negedge clk) ev = 1; @(negedge clk) ev = 0; exp_n++;
        end else begin
          int l;
          l = $urandom_range(0, 1);
          if (ls[l]) exp_n++;      // a stable link falls: error
          ls[l] = ~ls[l];
        end
        expect_pulses(exp_n, $sformatf("random step %0d", i));
        checks++; if (maxlow != 0 && maxlow != 4) begin failures++; $display("FAIL pulse width %0d", maxlow); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
