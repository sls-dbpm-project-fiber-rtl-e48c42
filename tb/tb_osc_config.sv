// tb_osc_config - reference oscillator set-up sequence against a model of
// the oscillator's register file, on four separate I2C buses:
//   0: normal start-up; two target registers already hold their value, so
//      only four of six are written, then all six verified and the output
//      enabled;
//   1: one register is spoiled once after the writes: the verify fails, all
//      six are written again and the set-up completes;
//   2: the register is spoiled after every write phase: fail after the
//      retries, the oscillator output is never enabled;
//   3: no device answers the address: fail at the first byte.
// Register contents, transfer counts and START/STOP counts are compared with
// numbers worked out from the sequence; ref_en must never be high before the
// enable register was written.
module tb_osc_config;
  localparam logic [47:0] T = 48'h11_22_49_33_3B_44;   // regs 12 .. 7; 8 and 10 keep their preset
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [3:0]  done, fail, ref_en;
  logic [47:0] cur [4];
  int n_start [4], n_stop [4], n_write [4], n_read [4];
  int s0 [4], p0 [4];  // START / STOP seen while the bus settled in reset
  bit early_en [4];

  for (genvar g = 0; g < 4; g++) begin : g_b
    logic st, rw, busy, dn, ae, scl_low, sda_low, dev_low, scl, sda;
    logic [7:0] ra, wd, rd;
    assign scl = !scl_low;
    assign sda = !(sda_low || dev_low);
    i2c_link #(.DEV_ADDR(g == 3 ? 7'h22 : 7'h55), .CLK_DIV(4)) m (
      .clk, .rst, .start(st), .rw, .reg_addr(ra), .wdata(wd), .busy, .done(dn), .rdata(rd),
      .ack_err(ae), .scl_low, .sda_low, .sda_in(sda));
    osc_config #(.TARGET(T)) c (
      .clk, .rst, .i2c_start(st), .i2c_rw(rw), .i2c_reg(ra), .i2c_wdata(wd), .i2c_busy(busy),
      .i2c_done(dn), .i2c_rdata(rd), .i2c_ack_err(ae), .done(done[g]), .fail(fail[g]),
      .ref_en(ref_en[g]), .cur_cfg(cur[g]));
    tb_i2c_slave #(.ADDR(7'h55)) s (.scl, .sda, .sda_low(dev_low),
      .n_start(n_start[g]), .n_stop(n_stop[g]), .n_write(n_write[g]), .n_read(n_read[g]));
    initial early_en[g] = 0;
    always @(posedge clk) if (ref_en[g] && s.regs[135] != 8'h40) early_en[g] = 1;
    // spoil register 9 when a verify pass starts (bus 1 once, bus 2 always)
    if (g == 1 || g == 2) begin : g_spoil
      int n = 0;
      always @(posedge dn) if (c.phase == 3'd1 && c.idx == 3'd5 && (g == 2 || n == 0)) begin
        #1 s.regs[9] = 8'h00; n++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int g = 0; g < 4; g++) begin s0[g] = n_start[g]; p0[g] = n_stop[g]; end
    rst = 0;
    wait (&(done | fail));
    repeat (10) @(posedge clk);
    // bus 0
    check(done[0] && !fail[0] && ref_en[0], "bus 0 set-up done");
    check(cur[0] == {8'(12*7+3), 8'(11*7+3), 8'(10*7+3), 8'(9*7+3), 8'(8*7+3), 8'(7*7+3)}, "bus 0 set-up read at start");
    for (int r = 0; r < 6; r++) check(g_b[0].s.regs[7 + r] == T[r*8 +: 8], $sformatf("bus 0 register %0d", 7 + r));
    check(g_b[0].s.regs[135] == 8'h40, "bus 0 output enabled");
    check(n_write[0] == 4 + 1 && n_read[0] == 12, $sformatf("bus 0 %0d writes %0d reads", n_write[0], n_read[0]));
    check(n_start[0] - s0[0] == 12 * 2 + 5 && n_stop[0] - p0[0] == 17, $sformatf("bus 0 %0d START %0d STOP", n_start[0], n_stop[0]));
    // bus 1: one retry writing all six
    check(done[1] && !fail[1] && ref_en[1], "bus 1 set-up done after retry");
    for (int r = 0; r < 6; r++) check(g_b[1].s.regs[7 + r] == T[r*8 +: 8], $sformatf("bus 1 register %0d", 7 + r));
    check(n_write[1] == 4 + 6 + 1 && n_read[1] == 18, $sformatf("bus 1 %0d writes %0d reads", n_write[1], n_read[1]));
    // bus 2: gives up after two retries
    check(fail[2] && !done[2] && !ref_en[2], "bus 2 fails");
    check(g_b[2].s.regs[135] == 8'(135*7+3), "bus 2 output not enabled");
    check(n_write[2] == 4 + 6 + 6 && n_read[2] == 24, $sformatf("bus 2 %0d writes %0d reads", n_write[2], n_read[2]));
    // bus 3: no answer
    check(fail[3] && !done[3] && !ref_en[3], "bus 3 fails");
    check(n_start[3] - s0[3] == 1 && n_stop[3] - p0[3] == 1 && n_read[3] == 0 && n_write[3] == 0,
          $sformatf("bus 3 %0d START %0d STOP %0d writes", n_start[3] - s0[3], n_stop[3] - p0[3], n_write[3]));
    for (int g = 0; g < 4; g++) check(!early_en[g], $sformatf("bus %0d reference enabled too early", g));
    // reset starts the sequence again: bus 0 now finds the target set-up and writes nothing but the enable
    rst = 1; repeat (3) @(posedge clk); rst = 0;
    repeat (3) @(posedge clk);
    wait (done[0] | fail[0]);
    repeat (10) @(posedge clk);
    check(done[0] && cur[0] == T, "bus 0 second start finds the target set-up");
    check(n_write[0] == 5 + 1 && n_read[0] == 24, $sformatf("bus 0 second start %0d writes %0d reads", n_write[0], n_read[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
