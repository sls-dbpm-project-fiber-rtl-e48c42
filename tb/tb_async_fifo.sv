// tb_async_fifo - random writes and reads across two unrelated clocks,
// checked against a queue model: order, no loss, full and empty behaviour.
module tb_async_fifo;
  localparam int W = 16, AW = 3;
  logic wclk = 0, rclk = 0, rst = 1;
  logic wen = 0, ren = 0, wfull, rempty;
  logic [W-1:0] wdata = '0, rdata;
  logic [AW:0] wlevel, rlevel;
  int checks = 0, failures = 0, nw = 0, nr = 0, saw_full = 0;
  logic [W-1:0] q[$];

  async_fifo #(.WIDTH(W), .AW(AW)) dut (.wclk, .wrst(rst), .wen, .wdata, .wfull, .wlevel,
                                        .rclk, .rrst(rst), .ren, .rdata, .rempty, .rlevel);
  always #5 wclk = ~wclk;
  always #7.3 rclk = ~rclk;

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge wclk) if (!rst) begin
    if (wen && !wfull) begin q.push_back(wdata); nw++; end
    if (wfull) saw_full++;
    checks++;
    if (wlevel > (AW+1)'(2**AW)) begin failures++; $display("FAIL wlevel %0d", wlevel); end
    wen   <= (nw < 2000) && ($urandom_range(0, 3) != 0);
    wdata <= W'($urandom);
  end

  always @(posedge rclk) if (!rst) begin
    if (ren && !rempty) begin
      checks++;
      if (q.size() == 0 || rdata !== q[0]) begin
        failures++; $display("FAIL read %h exp %h", rdata, q.size() ? q[0] : '0);
      end else void'(q.pop_front());
      nr++;
    end
    ren <= (nr < 1000) ? ($urandom_range(0, 3) == 0) : 1'b1;
  end

  initial begin
    repeat (3) @(posedge wclk);
    rst = 0;
    wait (nr == 2000);
    repeat (10) @(posedge rclk);
    checks++;
    if (!rempty || q.size() != 0) begin failures++; $display("FAIL not empty at end"); end
    checks++;
    if (saw_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
