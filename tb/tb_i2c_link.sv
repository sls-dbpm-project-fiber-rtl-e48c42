// tb_i2c_link - checks the I2C master against tb_i2c_slave: register writes
// followed by read-back, reads of preset registers, a transfer to an absent
// device address (ack_err), the START/STOP count of each transfer, the SCL
// period of 4 x CLK_DIV clocks and the transfer length in SCL periods.
module tb_i2c_link;
  logic clk = 0, rst = 0;
  logic start = 0, rw = 0, busy, done, ack_err, scl_low, sda_low, s_low, s2_low;
  logic [7:0] reg_addr = '0, wdata = '0, rdata;
  logic scl, sda;
  int n_start, n_stop, n_write, n_read, x1, x2, x3, x4;
  int checks = 0, failures = 0;
  localparam int DIV = 5;
  // a second master on the same bus addresses a device that is absent
  logic start2 = 0, busy2, done2, ack_err2, scl_low2, sda_low2;
  logic [7:0] rdata2;
  assign scl = !(scl_low || scl_low2);
  assign sda = !(sda_low || sda_low2 || s_low || s2_low);
  i2c_link #(.DEV_ADDR(7'h22), .CLK_DIV(DIV)) dut2 (.clk, .rst, .start(start2), .rw(1'b0), .reg_addr(8'h01), .wdata(8'h02),
    .busy(busy2), .done(done2), .rdata(rdata2), .ack_err(ack_err2), .scl_low(scl_low2), .sda_low(sda_low2), .sda_in(sda));
  i2c_link #(.DEV_ADDR(7'h55), .CLK_DIV(DIV)) dut (.clk, .rst, .start, .rw, .reg_addr, .wdata,
    .busy, .done, .rdata, .ack_err, .scl_low, .sda_low, .sda_in(sda));
  tb_i2c_slave #(.ADDR(7'h55)) dev (.scl, .sda, .sda_low(s_low), .n_start, .n_stop, .n_write, .n_read);
  // a second device elsewhere on the bus that must stay silent
  tb_i2c_slave #(.ADDR(7'h10)) other (.scl, .sda, .sda_low(s2_low), .n_start(x1), .n_stop(x2), .n_write(x3), .n_read(x4));
  always #5 clk = ~clk;
  initial begin #5ms; failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // SCL period
  realtime t_rise, per;
  int n_per_bad = 0, n_per = 0;
  always @(posedge busy or posedge busy2) t_rise = 0;
  always @(posedge scl) begin
    if (t_rise > 0 && (busy || busy2)) begin
      per = $realtime - t_rise;
      n_per++;
      if (per != 4 * DIV * 10) n_per_bad++;
    end
    t_rise = $realtime;
  end

  task automatic xfer(input bit r, input logic [7:0] ra, input logic [7:0] wd, output logic [7:0] rd, output bit err, output int clocks);
    @(negedge clk); start = 1; rw = r; reg_addr = ra; wdata = wd;
    @(negedge clk); start = 0; clocks = 1;
    while (!done) begin @(negedge clk); clocks++; end
    rd = rdata; err = ack_err;
    repeat (20) @(negedge clk);
  endtask

  logic [7:0] d;
  bit e;
  int c, s0, p0;
  initial begin
    #1 rst = 1; #20 rst = 0;
    repeat (5) @(negedge clk);
    check(scl && sda, "bus idle after reset");
    // writes and read-back
    for (int i = 0; i < 6; i++) begin
      logic [7:0] ra, wd;
      ra = 8'($urandom); wd = 8'($urandom);
      s0 = n_start; p0 = n_stop;
      xfer(0, ra, wd, d, e, c);
      check(!e, "write acknowledged");
      check(dev.regs[ra] == wd, $sformatf("register %h written %h (has %h)", ra, wd, dev.regs[ra]));
      check(n_start == s0 + 1 && n_stop == p0 + 1, "write: one START and one STOP");
      // START + 3 bytes of 9 bits + STOP, each one SCL period (+ start edge)
      check(c >= 29 * 4 * DIV && c <= 29 * 4 * DIV + 4, $sformatf("write took %0d clocks", c));
      s0 = n_start; p0 = n_stop;
      xfer(1, ra, 8'h00, d, e, c);
      check(!e && d == wd, $sformatf("read back %h exp %h", d, wd));
      check(n_start == s0 + 2 && n_stop == p0 + 1, "read: START, repeated START, STOP");
      check(c >= 39 * 4 * DIV && c <= 39 * 4 * DIV + 4, $sformatf("read took %0d clocks", c));
    end
    // preset registers
    for (int i = 0; i < 4; i++) begin
      logic [7:0] ra;
      ra = 8'(200 + i);
      xfer(1, ra, 8'h00, d, e, c);
      check(!e && d == 8'(ra * 7 + 3), $sformatf("read of preset register %h = %h", ra, d));
    end
    check(x3 == 0 && x4 == 0, "other device untouched");
    // absent device: talk to a master whose address nobody answers
    s0 = n_start; p0 = n_stop; c = 0;
    @(negedge clk); start2 = 1; @(negedge clk); start2 = 0;
    while (!done2) begin @(negedge clk); c++; end
    check(ack_err2, "no acknowledge from an absent device gives ack_err");
    check(c <= 11 * 4 * DIV + 4, $sformatf("transfer stopped after the address byte (%0d clocks)", c));
    check(n_start == s0 + 1 && n_stop == p0 + 1 && scl && sda, "absent device: START, STOP, bus released");
    repeat (20) @(negedge clk);
    xfer(1, 8'd201, 8'h00, d, e, c);
    check(!e && !ack_err && d == 8'(201 * 7 + 3), "first master still works afterwards");
    check(n_per > 100 && n_per_bad == 0, $sformatf("SCL period 4 x CLK_DIV clocks (%0d of %0d wrong)", n_per_bad, n_per));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
