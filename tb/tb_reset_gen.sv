// tb_reset_gen - reset follows the lock flag: asserted at once when lock is
// lost or ext_rst is high, released exactly HOLD+1 rising edges after both
// are gone. A second instance with a longer hold sees random lock drops and
// external reset pulses of random length and phase.
module tb_reset_gen;
  localparam int HOLD = 4;
  logic clk = 0, locked = 0, ext = 0, rst;
  int checks = 0, failures = 0;
  reset_gen #(.HOLD(HOLD)) dut (.clk, .locked, .ext_rst(ext), .rst);
  localparam int HOLD2 = 11;
  logic locked2 = 0, ext2 = 0, rst2;
  reset_gen #(.HOLD(HOLD2)) dut2 (.clk, .locked(locked2), .ext_rst(ext2), .rst(rst2));
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic expect_release(input string what);
    int n = 0;
    while (rst && n < 50) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != HOLD + 1) begin failures++; $display("FAIL %s released after %0d clocks", what, n); end
  endtask

  initial begin
    #1;
    repeat (5) @(posedge clk);
    #1; checks++; if (!rst) begin failures++; $display("FAIL no reset while unlocked"); end
    locked = 1;
    expect_release("lock");
    repeat (5) @(posedge clk);
    #1; checks++; if (rst) begin failures++; $display("FAIL spurious reset"); end
    #2 locked = 0; #1;
    checks++; if (!rst) begin failures++; $display("FAIL reset not asynchronous"); end
    #3 locked = 1;
    expect_release("relock");
    #2 ext = 1; #1;
    checks++; if (!rst) begin failures++; $display("FAIL ext_rst ignored"); end
    @(posedge clk); #2 ext = 0;
    expect_release("ext");
    // random drops on the second instance
    locked2 = 1;
    for (int t = 0; t < 40; t++) begin
      int n, w;
      n = 0;
      while (rst2 && n < 60) begin @(posedge clk); #1; n++; end
      checks++;
      if (n != HOLD2 + 1) begin failures++; $display("FAIL trial %0d released after %0d clocks", t, n); end
      repeat ($urandom_range(0, 6)) @(posedge clk);
      @(negedge clk); #1;
      w = $urandom_range(1, 25);
      if (w % 5 == 3) w++;  // keep the release off a clock edge
      if (t % 2) ext2 = 1; else locked2 = 0;
      #1; checks++;
      if (!rst2) begin failures++; $display("FAIL trial %0d not reset at once", t); end
      #(w) begin ext2 = 0; locked2 = 1; end
    end
    checks++; if (rst) begin failures++; $display("FAIL first instance disturbed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
