// tb_mem_slave - bus reads of the firmware ID, version and status registers,
// write and read back of every configuration register, FIFO reset pulses on
// 0->1 writes only, and the read latency (data and ACK one clock after the
// strobe).
module tb_mem_slave;
  import fol_pkg::*;
  logic clk = 0, rst = 1, cs_n = 1, rd_n = 1, wr_n = 1, oe, ack;
  logic [5:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  cfg_t cfg;
  stat_t stat;
  int checks = 0, failures = 0;
  int pulses [4];

  mem_slave #(.FW_REV(8'd3), .FW_DAY(8'd17), .FW_MONTH(8'd6), .FW_YEAR(8'd14), .RST_PULSE(4)) dut (
    .clk, .rst, .cs_n, .rd_n, .wr_n, .addr, .wdata, .rdata, .rdata_oe(oe), .ack, .cfg, .stat);
  always #10 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [3:0] rst_q = '0;
  always @(negedge clk) begin
    for (int i = 0; i < 4; i++) begin
      logic b;
      b = (i < 2) ? cfg.lp_tx_fifo_rst[i] : cfg.lp_rx_fifo_rst[i-2];
      if (b && !rst_q[i]) pulses[i]++;
      rst_q[i] <= b;
    end
  end

  task automatic rd(input logic [5:0] a, input logic [7:0] exp);
    @(negedge clk); addr = a; cs_n = 0; rd_n = 0;
    @(posedge clk); #1;
    checks++;
    if (!ack || !oe || rdata !== exp) begin failures++; $display("FAIL read %h: %h exp %h ack %0d", a, rdata, exp, ack); end
    @(negedge clk); cs_n = 1; rd_n = 1;
    @(posedge clk); #1;
    checks++; if (ack || oe) begin failures++; $display("FAIL ack held"); end
  endtask
  task automatic wr(input logic [5:0] a, input logic [7:0] v);
    @(negedge clk); addr = a; wdata = v; cs_n = 0; wr_n = 0;
    @(negedge clk); @(negedge clk); cs_n = 1; wr_n = 1;
  endtask

  initial begin
    stat = '0;
    stat.tx_active = 2'b10; stat.rx_stable = 2'b01; stat.rx_err_cnt[0] = 8'd42; stat.rx_err_cnt[1] = 8'd255;
    repeat (2) @(posedge clk);
    rst = 0;
    begin
      string id = "FOLSHARC";
      for (int i = 0; i < 8; i++) rd(6'(i), id[i]);
    end
    rd(6'h08, 3); rd(6'h09, 17); rd(6'h0A, 6); rd(6'h0B, 14);
    rd(6'h10, 0); rd(6'h11, 1); rd(6'h12, 1); rd(6'h13, 0); rd(6'h14, 42); rd(6'h15, 255);
    rd(6'h0C, 0); rd(6'h30, 0);
    for (int a = 6'h20; a <= 6'h27; a++) rd(6'(a), 0);     // defaults
    checks++; if (cfg.trg_sel != TRG_NONE || cfg.trg_pol || cfg.lp_full_speed != 0) begin failures++; $display("FAIL defaults"); end
    wr(6'h20, 8'hFF); rd(6'h20, 1); checks++; if (cfg.lp_full_speed != 2'b01) begin failures++; $display("FAIL speed1"); end
    wr(6'h21, 8'h01); rd(6'h21, 1); checks++; if (cfg.lp_full_speed != 2'b11) begin failures++; $display("FAIL speed2"); end
    wr(6'h24, 8'h02); rd(6'h24, 2); checks++; if (cfg.trg_sel != TRG_B) begin failures++; $display("FAIL trg sel"); end
    wr(6'h24, 8'h07); rd(6'h24, 3);
    wr(6'h25, 8'h01); rd(6'h25, 1); checks++; if (!cfg.trg_pol) begin failures++; $display("FAIL trg pol"); end
    wr(6'h10, 8'h01); rd(6'h10, 0);                         // status is read only
    // FIFO resets: pulse on 0->1 only
    wr(6'h22, 1); wr(6'h22, 1); wr(6'h22, 0); wr(6'h22, 1);
    wr(6'h23, 1); wr(6'h26, 1); wr(6'h27, 1); wr(6'h27, 0);
    rd(6'h22, 1); rd(6'h27, 0);
    repeat (6) @(posedge clk);
    checks++;
    if (pulses[0] != 2 || pulses[1] != 1 || pulses[2] != 1 || pulses[3] != 1) begin
      failures++; $display("FAIL reset pulses %0d %0d %0d %0d", pulses[0], pulses[1], pulses[2], pulses[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
