// tb_irq_trigger - IRQ2 pulses for active edges of the selected trigger only:
// none selected gives no pulse, each of A, B, C can be selected, and the low
// active polarity turns falling edges into events. Random runs then toggle
// all three inputs at random times and compare the pulse count with the
// number of active edges of the selected input; the delay from an active
// edge to IRQ2 going low is checked as well.
module tb_irq_trigger;
  import fol_pkg::*;
  logic clk = 0, rst = 1, a = 0, b = 0, c = 0, pol = 0, irq, evt;
  trg_sel_e sel = TRG_NONE;
  int checks = 0, failures = 0, npulse = 0, low = 0, maxlow = 0;
  irq_trigger #(.IRQ_PULSE(4)) dut (.clk, .rst, .trg_a(a), .trg_b(b), .trg_c(c), .trg_sel(sel), .trg_pol(pol), .irq2_n(irq), .evt);
  always #10 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic irq_q = 1;
  int nevt = 0, lat = 0, maxlat = 0, minlat = 1000;
  bit  timing = 0;
  always @(posedge clk) if (!rst) begin
    if (evt) nevt++;
    if (timing) begin
      lat++;
      if (!irq) begin timing = 0; if (lat > maxlat) maxlat = lat; if (lat < minlat) minlat = lat; end
    end
  end
  always @(posedge clk) if (!rst) begin
    irq_q <= irq;
    if (irq_q && !irq) npulse++;
    if (!irq) low++; else begin if (low > maxlow) maxlow = low; low = 0; end
  end
  // na, nb, nc high pulses on A, B and C, interleaved, so that every input
  // has its own count
  task automatic pulses(input int na, input int nb, input int nc);
    for (int i = 0; i < 4; i++) begin
      if (i < na) begin a = ~a; repeat (10) @(posedge clk); a = ~a; repeat (10) @(posedge clk); end
      if (i < nb) begin b = ~b; repeat (10) @(posedge clk); b = ~b; repeat (10) @(posedge clk); end
      if (i < nc) begin c = ~c; repeat (10) @(posedge clk); c = ~c; repeat (10) @(posedge clk); end
    end
  endtask
  task automatic expect_n(input int n, input string what);
    checks++; if (npulse != n) begin failures++; $display("FAIL %s: %0d pulses exp %0d", what, npulse, n); end
    npulse = 0;
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    pulses(2, 3, 4); expect_n(0, "no trigger selected");
    sel = TRG_A; repeat (5) @(posedge clk); pulses(2, 3, 4); expect_n(2, "A high active");
    sel = TRG_B; repeat (5) @(posedge clk); pulses(2, 3, 4); expect_n(3, "B high active");
    sel = TRG_C; repeat (5) @(posedge clk); pulses(2, 3, 4); expect_n(4, "C high active");
    // make a low, then select low active A: only falling edges count
    pol = 1; sel = TRG_A; repeat (5) @(posedge clk); npulse = 0;
    a = 1; repeat (10) @(posedge clk); a = 0; repeat (10) @(posedge clk); a = 1; repeat (10) @(posedge clk);
    expect_n(1, "A low active");
    // low active B and C: a low pulse is one falling edge
    sel = TRG_B; repeat (5) @(posedge clk); npulse = 0;
    b = 1; c = 1; repeat (10) @(posedge clk); npulse = 0;
    pulses(0, 2, 3); expect_n(2, "B low active");
    sel = TRG_C; repeat (5) @(posedge clk); npulse = 0;
    pulses(1, 2, 3); expect_n(3, "C low active");
    checks++; if (maxlow != 4) begin failures++; $display("FAIL pulse width %0d", maxlow); end
    for (int r = 0; r < 30; r++) begin
      int exp_n, k, v;
      trg_sel_e rs;
      k = $urandom_range(0, 3);
      rs = k == 0 ? TRG_NONE : k == 1 ? TRG_A : k == 2 ? TRG_B : TRG_C;
      sel = rs; pol = $urandom_range(0, 1);
      repeat (6) @(posedge clk);
      npulse = 0; nevt = 0; exp_n = 0;
      for (int i = 0; i < 20; i++) begin
        k = $urandom_range(0, 2);
        @(negedge clk);
        if (k == 0) begin a = ~a; v = a; end
        else if (k == 1) begin b = ~b; v = b; end
        else begin c = ~c; v = c; end
        if (rs != TRG_NONE && k == int'(rs) - 1 && v != pol) begin
          exp_n++;
          lat = 0; timing = 1;
        end
        repeat ($urandom_range(8, 14)) @(posedge clk);
        if (timing) begin checks++; failures++; timing = 0; $display("FAIL run %0d: no IRQ2 after edge", r); end
      end
      repeat (8) @(posedge clk);
      checks++;
      if (npulse != exp_n || nevt != exp_n) begin
        failures++; $display("FAIL run %0d sel %0d pol %0d: %0d pulses %0d events exp %0d", r, k, pol, npulse, nevt, exp_n);
      end
    end
    checks++;
    if (minlat != maxlat || maxlat < 3 || maxlat > 4) begin
      failures++; $display("FAIL edge to IRQ2 delay %0d..%0d clocks", minlat, maxlat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
