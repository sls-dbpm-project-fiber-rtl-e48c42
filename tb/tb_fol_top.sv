// tb_fol_top - end-to-end testbench of two FOL boards, A and B, joined by two
// fibres in each direction, at the top module's default parameters. The
// boards stand side by side: link port 3 (channel 0) sends to the left
// neighbour and link port 4 (channel 1) to the right one, so channel 0 of A
// and channel 1 of B form one fibre pair, and channel 1 of A and channel 0
// of B the other.
//
// Each board has its own DSP clock and transceiver clock (slightly different
// frequencies). tb_fiber models the serial path of each fibre with a
// different bit offset, so every receiver has to find the comma itself, two
// of them also the 16-bit word boundary. The recovered clock of a receiver is
// the far transmitter's clock. On each board two tb_lp_sender models play the
// DSP link ports 3/4 and two tb_lp_receiver models the link ports 1/2; each
// stream carries numbered words that are checked at the far board.
//
// Phases: reset and link synchronisation; register reads (ID, status);
// data in all four streams at half speed, which is slower than the DSP sends,
// so the far end's DSP FIFO fills and sends STOP and the local LACK drops;
// a DSP that holds LACK low (back pressure); full speed on one output port
// with a check of its LCLK timing; a FIFO reset; a bit error on one fibre
// (error counter, link loss, IRQ1); a disconnected fibre (link loss on the
// far board, STOP back to the sender); a DSP FIFO overflow (flow control
// bypassed by force) giving IRQ1; the trigger interrupt IRQ2. In parallel
// board A sets up its reference oscillator over I2C (tb_i2c_slave stands in
// for the oscillator) while board B, with nothing on its bus, gives up. Every mechanism
// is counted and a mechanism that never happened is a failure.
module tb_fol_top;
  import fol_pkg::*;

  // ------------------------------------------------------------ clocks
  logic [1:0] sclk = '0, sys_clk = '0;
  initial forever #12.5  sclk[0]    = ~sclk[0];
  initial forever #12.35 sclk[1]    = ~sclk[1];
  initial forever #6.667 sys_clk[0] = ~sys_clk[0];
  initial forever #6.7   sys_clk[1] = ~sys_clk[1];
  logic cfg_clk = 1'b0;                      // 80 MHz configuration clock
  initial forever #6.25  cfg_clk = ~cfg_clk;

  logic [1:0] locked = '0;

  // ------------------------------------------------------------ boards
  logic [1:0][1:0]       lp_in_lclk, lp_in_lack, lp_out_lclk, lp_out_lack;
  logic [1:0][1:0][3:0]  lp_in_ldat, lp_out_ldat;
  logic [1:0]            cs_n, rd_n, wr_n, rdata_oe, ack, irq1_n, irq2_n;
  logic [1:0][5:0]       addr;
  logic [1:0][7:0]       wdata, rdata;
  logic [1:0]            trg_a, trg_b, trg_c;
  logic [1:0][1:0][19:0] tx_code, rx_code;

  fol_top a (
    .sclk(sclk[0]), .pll_dsp_locked(locked[0]), .sys_clk(sys_clk[0]), .gxb_tx_locked(locked[0]),
    .rx_clk({sys_clk[1], sys_clk[1]}), .rx_locked({locked[0], locked[0]}),
    .lp_in_lclk(lp_in_lclk[0]), .lp_in_ldat(lp_in_ldat[0]), .lp_in_lack(lp_in_lack[0]),
    .lp_out_lclk(lp_out_lclk[0]), .lp_out_ldat(lp_out_ldat[0]), .lp_out_lack(lp_out_lack[0]),
    .cs_n(cs_n[0]), .rd_n(rd_n[0]), .wr_n(wr_n[0]), .addr(addr[0]), .wdata(wdata[0]),
    .rdata(rdata[0]), .rdata_oe(rdata_oe[0]), .ack(ack[0]),
    .trg_a(trg_a[0]), .trg_b(trg_b[0]), .trg_c(trg_c[0]), .irq1_n(irq1_n[0]), .irq2_n(irq2_n[0]),
    .tx_code(tx_code[0]), .rx_code(rx_code[0]),
    .cfg_clk(cfg_clk), .cfg_pll_locked(locked[0]), .osc_cfg_done(osc_done[0]), .osc_cfg_fail(osc_fail[0]),
    .osc_ref_en(osc_ref_en[0]), .i2c_scl_low(i2c_scl_low), .i2c_sda_low(i2c_sda_low), .i2c_sda_in(i2c_sda)
  );
  fol_top b (
    .sclk(sclk[1]), .pll_dsp_locked(locked[1]), .sys_clk(sys_clk[1]), .gxb_tx_locked(locked[1]),
    .rx_clk({sys_clk[0], sys_clk[0]}), .rx_locked({locked[1], locked[1]}),
    .lp_in_lclk(lp_in_lclk[1]), .lp_in_ldat(lp_in_ldat[1]), .lp_in_lack(lp_in_lack[1]),
    .lp_out_lclk(lp_out_lclk[1]), .lp_out_ldat(lp_out_ldat[1]), .lp_out_lack(lp_out_lack[1]),
    .cs_n(cs_n[1]), .rd_n(rd_n[1]), .wr_n(wr_n[1]), .addr(addr[1]), .wdata(wdata[1]),
    .rdata(rdata[1]), .rdata_oe(rdata_oe[1]), .ack(ack[1]),
    .trg_a(trg_a[1]), .trg_b(trg_b[1]), .trg_c(trg_c[1]), .irq1_n(irq1_n[1]), .irq2_n(irq2_n[1]),
    .tx_code(tx_code[1]), .rx_code(rx_code[1]),
    .cfg_clk(cfg_clk), .cfg_pll_locked(locked[1]), .osc_cfg_done(osc_done[1]), .osc_cfg_fail(osc_fail[1]),
    .osc_ref_en(osc_ref_en[1]), .i2c_scl_low(), .i2c_sda_low(), .i2c_sda_in(1'b1)
  );

  // reference oscillator of board A on its I2C bus
  logic [1:0] osc_done, osc_fail, osc_ref_en;
  logic i2c_scl_low, i2c_sda_low, osc_sda_low;
  logic i2c_scl, i2c_sda;
  int   osc_start, osc_stop, osc_write, osc_read;
  assign i2c_scl = !i2c_scl_low;
  assign i2c_sda = !(i2c_sda_low || osc_sda_low);
  tb_i2c_slave #(.ADDR(7'h55)) osc (.scl(i2c_scl), .sda(i2c_sda), .sda_low(osc_sda_low),
    .n_start(osc_start), .n_stop(osc_stop), .n_write(osc_write), .n_read(osc_read));

  // ------------------------------------------------------------ fibres
  // The boards stand side by side: the left fibre pair of A (channel 0) is the
  // right fibre pair of B (channel 1) and vice versa.
  // fibre [k][i]: from board k channel i to board 1-k channel 1-i
  logic [1:0][1:0] connected, flip;
  tb_fiber #(.OFFSET(0))  f_a0 (.clk(sys_clk[0]), .tx(tx_code[0][0]), .connected(connected[0][0]), .flip_bit(flip[0][0]), .rx(rx_code[1][1]));
  tb_fiber #(.OFFSET(7))  f_a1 (.clk(sys_clk[0]), .tx(tx_code[0][1]), .connected(connected[0][1]), .flip_bit(flip[0][1]), .rx(rx_code[1][0]));
  tb_fiber #(.OFFSET(13)) f_b0 (.clk(sys_clk[1]), .tx(tx_code[1][0]), .connected(connected[1][0]), .flip_bit(flip[1][0]), .rx(rx_code[0][1]));
  tb_fiber #(.OFFSET(19)) f_b1 (.clk(sys_clk[1]), .tx(tx_code[1][1]), .connected(connected[1][1]), .flip_bit(flip[1][1]), .rx(rx_code[0][0]));

  // ------------------------------------------------------------ DSP link ports
  // sender [k][i] on board k link port 3+i; receiver [k][i] on board k link
  // port 1+i, fed by sender [1-k][1-i]
  logic [1:0][1:0] s_en, s_ign, r_acc, r_en, r_resync;
  int      sent [2][2], got [2][2], bad [2][2], gaps [2][2], nidx [2][2];
  realtime wtime [2][2];
  tb_lp_sender #(.SEED(8'hA3)) s_a0 (.sclk(sclk[0]), .enable(s_en[0][0]), .ignore_lack(s_ign[0][0]), .lack(lp_in_lack[0][0]), .lclk(lp_in_lclk[0][0]), .ldat(lp_in_ldat[0][0]), .sent(sent[0][0]));
  tb_lp_sender #(.SEED(8'hA4)) s_a1 (.sclk(sclk[0]), .enable(s_en[0][1]), .ignore_lack(s_ign[0][1]), .lack(lp_in_lack[0][1]), .lclk(lp_in_lclk[0][1]), .ldat(lp_in_ldat[0][1]), .sent(sent[0][1]));
  tb_lp_sender #(.SEED(8'hB3)) s_b0 (.sclk(sclk[1]), .enable(s_en[1][0]), .ignore_lack(s_ign[1][0]), .lack(lp_in_lack[1][0]), .lclk(lp_in_lclk[1][0]), .ldat(lp_in_ldat[1][0]), .sent(sent[1][0]));
  tb_lp_sender #(.SEED(8'hB4)) s_b1 (.sclk(sclk[1]), .enable(s_en[1][1]), .ignore_lack(s_ign[1][1]), .lack(lp_in_lack[1][1]), .lclk(lp_in_lclk[1][1]), .ldat(lp_in_ldat[1][1]), .sent(sent[1][1]));
  tb_lp_receiver #(.SEED(8'hB4)) r_a0 (.accept(r_acc[0][0]), .enable(r_en[0][0]), .resync(r_resync[0][0]), .lack(lp_out_lack[0][0]), .lclk(lp_out_lclk[0][0]), .ldat(lp_out_ldat[0][0]), .got(got[0][0]), .bad(bad[0][0]), .gaps(gaps[0][0]), .next_idx(nidx[0][0]), .last_word_time(wtime[0][0]));
  tb_lp_receiver #(.SEED(8'hB3)) r_a1 (.accept(r_acc[0][1]), .enable(r_en[0][1]), .resync(r_resync[0][1]), .lack(lp_out_lack[0][1]), .lclk(lp_out_lclk[0][1]), .ldat(lp_out_ldat[0][1]), .got(got[0][1]), .bad(bad[0][1]), .gaps(gaps[0][1]), .next_idx(nidx[0][1]), .last_word_time(wtime[0][1]));
  tb_lp_receiver #(.SEED(8'hA4)) r_b0 (.accept(r_acc[1][0]), .enable(r_en[1][0]), .resync(r_resync[1][0]), .lack(lp_out_lack[1][0]), .lclk(lp_out_lclk[1][0]), .ldat(lp_out_ldat[1][0]), .got(got[1][0]), .bad(bad[1][0]), .gaps(gaps[1][0]), .next_idx(nidx[1][0]), .last_word_time(wtime[1][0]));
  tb_lp_receiver #(.SEED(8'hA3)) r_b1 (.accept(r_acc[1][1]), .enable(r_en[1][1]), .resync(r_resync[1][1]), .lack(lp_out_lack[1][1]), .lclk(lp_out_lclk[1][1]), .ldat(lp_out_ldat[1][1]), .got(got[1][1]), .bad(bad[1][1]), .gaps(gaps[1][1]), .next_idx(nidx[1][1]), .last_word_time(wtime[1][1]));

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // internal observation points: [board][channel]
  logic [1:0][1:0] link_st, rem_stop, bsync, slip, ovf;
  logic [1:0][3:0] fifo_rst;
  assign link_st  = {b.link_stable, a.link_stable};
  assign rem_stop = {b.g_ch[1].remote_stop, b.g_ch[0].remote_stop, a.g_ch[1].remote_stop, a.g_ch[0].remote_stop};
  assign bsync    = {b.g_ch[1].byte_sync, b.g_ch[0].byte_sync, a.g_ch[1].byte_sync, a.g_ch[0].byte_sync};
  assign slip     = {b.g_ch[1].u_comb.slip, b.g_ch[0].u_comb.slip, a.g_ch[1].u_comb.slip, a.g_ch[0].u_comb.slip};
  assign ovf      = {b.g_ch[1].overflow, b.g_ch[0].overflow, a.g_ch[1].overflow, a.g_ch[0].overflow};
  assign fifo_rst = {b.cfg.lp_rx_fifo_rst, b.cfg.lp_tx_fifo_rst, a.cfg.lp_rx_fifo_rst, a.cfg.lp_tx_fifo_rst};

  int n_i2c = 0;
  int n_sync, n_slip, n_stable, n_loss, n_stop, n_resume, n_lack_drop, n_ovf, n_fifo_rst;
  int n_irq1 [2], n_irq2 [2];
  initial begin
    n_sync = 0; n_slip = 0; n_stable = 0; n_loss = 0; n_stop = 0; n_resume = 0;
    n_lack_drop = 0; n_ovf = 0; n_fifo_rst = 0; n_irq1 = '{0, 0}; n_irq2 = '{0, 0};
  end
  bit running = 0; // counting starts after reset

  for (genvar k = 0; k < 2; k++) begin : g_mon
    for (genvar i = 0; i < 2; i++) begin : g_ch
      always @(posedge bsync[k][i])    if (running) n_sync++;
      always @(posedge link_st[k][i])  if (running) begin n_stable++; if (slip[k][i]) n_slip++; end
      always @(negedge link_st[k][i])  if (running) n_loss++;
      always @(posedge rem_stop[k][i]) if (running && link_st[k][i]) n_stop++;
      always @(negedge rem_stop[k][i]) if (running) n_resume++;
      always @(negedge lp_in_lack[k][i]) if (running) n_lack_drop++;
      always @(posedge ovf[k][i])      if (running) n_ovf++;
    end
    always @(posedge fifo_rst[k][0]) if (running) n_fifo_rst++;
    always @(negedge irq1_n[k]) if (running) n_irq1[k]++;
    always @(negedge irq2_n[k]) if (running) n_irq2[k]++;
  end

  // ------------------------------------------------------------ bus access
  task automatic wait_neg(input int k);
    if (k == 0) @(negedge sclk[0]); else @(negedge sclk[1]);
  endtask
  task automatic bus(input int k, input bit write, input logic [5:0] ad, input logic [7:0] wd, output logic [7:0] rd);
    int n = 0;
    wait_neg(k);
    cs_n[k] = 1'b0; addr[k] = ad; wdata[k] = wd;
    if (write) wr_n[k] = 1'b0; else rd_n[k] = 1'b0;
    do begin wait_neg(k); n++; end while (!ack[k] && n < 20);
    rd = rdata[k];
    check(ack[k] && (write || rdata_oe[k]), $sformatf("board %0d bus access %h answered", k, ad));
    cs_n[k] = 1'b1; rd_n[k] = 1'b1; wr_n[k] = 1'b1;
    wait_neg(k);
  endtask
  task automatic rd(input int k, input logic [5:0] ad, output logic [7:0] d);
    bus(k, 1'b0, ad, 8'h00, d);
  endtask
  task automatic wr(input int k, input logic [5:0] ad, input logic [7:0] d);
    logic [7:0] dummy;
    bus(k, 1'b1, ad, d, dummy);
  endtask

  task automatic all_streams(input bit on);
    s_en = {4{on}};
  endtask
  // wait until every sent word has arrived at its receiver
  task automatic drain(input int max_us);
    int t = 0;
    while (t < max_us * 10) begin
      bit done = 1;
      for (int k = 0; k < 2; k++) for (int i = 0; i < 2; i++)
        if (nidx[1-k][1-i] != sent[k][i]) done = 0;
      if (done) break;
      #100; t++;
    end
  endtask

  // start-up set-up of the reference oscillators: board A's completes on its
  // oscillator model; board B has no device on its bus and must give up
  task automatic i2c_config();
    int s0, p0;
    #1us; // configuration domain out of reset
    s0 = osc_start; p0 = osc_stop;
    wait ((osc_done[0] || osc_fail[0]) && (osc_done[1] || osc_fail[1]));
    #1;
    check(osc_done[0] && !osc_fail[0] && osc_ref_en[0], "board A oscillator set up");
    check({osc.regs[12], osc.regs[11], osc.regs[10], osc.regs[9], osc.regs[8], osc.regs[7]} == a.u_osc_cfg.TARGET &&
          osc.regs[135] == 8'h40, "board A oscillator registers written and output enabled");
    check(osc_write == 7 && osc_read == 12, $sformatf("board A oscillator %0d writes %0d reads", osc_write, osc_read));
    check(osc_start - s0 == 31 && osc_stop - p0 == 19, "I2C START/STOP count");
    n_i2c++;
    check(osc_fail[1] && !osc_done[1] && !osc_ref_en[1], "board B set-up gives up without a device");
    n_i2c++;
  endtask

  // ------------------------------------------------------------ stimulus
  logic [7:0] d;
  logic [7:0] err0 [2], err1;
  string id;
  initial begin
    cs_n = '1; rd_n = '1; wr_n = '1; addr = '0; wdata = '0;
    trg_a = '0; trg_b = '0; trg_c = '0;
    connected = '1; flip = '0;
    s_en = '0; s_ign = '0; r_acc = '1; r_en = '0; r_resync = '0;
    // power up twice so that every reset has a real rising edge
    #100  locked = '1;
    #500  locked = '0;
    #200  locked = '1;
    running = 1;
    fork i2c_config(); join_none
    #2us r_en = '1; // the DSPs listen once the boards are out of reset

    // -- link synchronisation
    #20us;
    check(link_st == '1, "all four receivers stable after power up");
    for (int k = 0; k < 2; k++) begin
      id = "";
      for (int j = 0; j < 8; j++) begin rd(k, A_FW_ID + 6'(j), d); id = {id, string'(d)}; end
      check(id == "FOLSHARC", $sformatf("board %0d firmware ID '%s'", k, id));
      rd(k, A_FW_MONTH, d); check(d == 8'd1, "firmware month");
      rd(k, A_RX1_STAT, d); check(d == 8'h01, "receiver 1 stable bit");
      rd(k, A_RX2_STAT, d); check(d == 8'h01, "receiver 2 stable bit");
      rd(k, A_TX1_STAT, d); check(d == 8'h01, "transmitter 1 active bit");
      rd(k, A_RX1_ERR, d);  err0[k] = d;
      rd(k, A_LP1_SPEED, d); check(d == 8'h00, "link port 1 at half speed after reset");
    end
    check(n_irq1[0] == 0 && n_irq1[1] == 0, "no IRQ1 during a clean start");

    // -- data in all four streams (half speed outputs are slower than inputs)
    all_streams(1);
    #60us;
    // -- back pressure: the DSP on board B link port 1 stops accepting
    r_acc[1][0] = 1'b0;
    #40us;
    check(lp_in_lack[0][1] == 1'b0, "board A link port 4 LACK low while far DSP blocks");
    r_acc[1][0] = 1'b1;
    #30us;
    all_streams(0);
    drain(200);
    for (int k = 0; k < 2; k++) for (int i = 0; i < 2; i++) begin
      check(nidx[1-k][1-i] == sent[k][i] && sent[k][i] > 100,
            $sformatf("stream %0d.%0d: %0d of %0d words delivered in order", k, i, nidx[1-k][1-i], sent[k][i]));
      check(bad[1-k][1-i] == 0 && gaps[1-k][1-i] == 0, $sformatf("stream %0d.%0d without loss or corruption", k, i));
    end

    // the error counters count only the start-up (before alignment)
    for (int k = 0; k < 2; k++) begin
      rd(k, A_RX1_ERR, d); check(d == err0[k], $sformatf("board %0d no receive errors during traffic", k));
    end
    rd(0, A_RX1_ERR, err1);

    // -- full speed on board B link port 1
    check(wtime[1][0] > 13.5 * 24.7 && wtime[1][0] < 14.5 * 24.7, $sformatf("half speed word %0t", wtime[1][0]));
    wr(1, A_LP1_SPEED, 8'h01);
    rd(1, A_LP1_SPEED, d); check(d == 8'h01, "link port 1 speed register");
    s_en[0][1] = 1'b1;
    #20us;
    s_en[0][1] = 1'b0;
    drain(50);
    check(wtime[1][0] > 6.5 * 24.7 && wtime[1][0] < 7.5 * 24.7, $sformatf("full speed word %0t", wtime[1][0]));
    check(nidx[1][0] == sent[0][1] && bad[1][0] == 0, "full speed stream complete");

    // -- FIFO reset on board B link port 1 (idle), then traffic again
    wr(1, A_LP1_RST, 8'h01);
    wr(1, A_LP1_RST, 8'h00);
    s_en[0][1] = 1'b1;
    #10us;
    s_en[0][1] = 1'b0;
    drain(50);
    check(nidx[1][0] == sent[0][1] && bad[1][0] == 0, "stream complete after FIFO reset");

    // -- bit error on the fibre from B channel 2 to A channel 1, link idle
    begin
      int irq_before, loss_before;
      irq_before = n_irq1[0];
      loss_before = n_loss;
      r_resync[0][0] = 1'b1;
      @(posedge sys_clk[1]); flip[1][1] = 1'b1;
      @(posedge sys_clk[1]); flip[1][1] = 1'b0;
      #5us;
      rd(0, A_RX1_ERR, d);
      check(d > err1 || d == 8'hFF, $sformatf("receiver 1 error counter %0d -> %0d after a bit error", err1, d));
      check(n_loss > loss_before, "link loss on a bit error");
      check(n_irq1[0] > irq_before, "IRQ1 on board A after a bit error");
      check(link_st[0][0], "receiver 1 stable again");
      r_resync[0][0] = 1'b0;
    end

    // -- fibre from A channel 1 to B channel 2 disconnected while A sends
    begin
      int irq_before, lack_before;
      irq_before = n_irq1[1];
      lack_before = n_lack_drop;
      r_resync[1][1] = 1'b1;
      s_en[0][0] = 1'b1;
      #5us;
      connected[0][0] = 1'b0;
      #5us;
      rd(1, A_RX2_STAT, d); check(d == 8'h00, "board B receiver 2 not stable without light");
      check(lp_in_lack[0][0] == 1'b0, "board A link port 3 stopped while the far receiver is down");
      check(n_irq1[1] > irq_before, "IRQ1 on board B for the lost fibre");
      connected[0][0] = 1'b1;
      #10us;
      rd(1, A_RX2_STAT, d); check(d == 8'h01, "board B receiver 2 stable after reconnection");
      check(n_lack_drop > lack_before, "LACK dropped during the disconnection");
      s_en[0][0] = 1'b0;
      drain(50);
      check(nidx[1][1] == sent[0][0], "stream 0.0 resumes after reconnection");
      r_resync[1][1] = 1'b0;
    end

    // -- overflow of board B's DSP FIFO of channel 2: flow control bypassed
    begin
      int irq_before;
      irq_before = n_irq1[1];
      r_resync[1][1] = 1'b1;
      force b.g_ch[1].stop_req = 1'b0;
      r_acc[1][1] = 1'b0;
      s_en[0][0] = 1'b1;
      #30us;
      check(n_ovf > 0, "board B DSP FIFO overflow seen");
      check(n_irq1[1] > irq_before, "IRQ1 on board B for lost data");
      s_en[0][0] = 1'b0;
      release b.g_ch[1].stop_req;
      r_acc[1][1] = 1'b1;
      #30us;
      r_resync[1][1] = 1'b0;
    end

    // -- trigger interrupt on board A: input A, then unselected input B
    wr(0, A_TRG_SEL, 8'h01);
    rd(0, A_TRG_SEL, d); check(d == 8'h01, "trigger select register");
    begin
      int irq2_prev;
      irq2_prev = n_irq2[0];
      #1us trg_a[0] = 1'b1; #1us trg_a[0] = 1'b0; #1us;
      check(n_irq2[0] == irq2_prev + 1, "IRQ2 on the selected trigger");
      trg_b[0] = 1'b1; #1us trg_b[0] = 1'b0; #1us;
      check(n_irq2[0] == irq2_prev + 1, "no IRQ2 on an unselected trigger");
      check(n_irq2[1] == 0, "no IRQ2 on board B");
    end

    wait (n_i2c == 2);

    // -- mechanism summary
    $display("mechanisms: comma sync %0d, word slip %0d, link stable %0d, link loss %0d, STOP %0d, resume %0d,",
             n_sync, n_slip, n_stable, n_loss, n_stop, n_resume);
    $display("            LACK drops %0d, overflow %0d, FIFO reset %0d, IRQ1 %0d/%0d, IRQ2 %0d/%0d",
             n_lack_drop, n_ovf, n_fifo_rst, n_irq1[0], n_irq1[1], n_irq2[0], n_irq2[1]);
    $display("            oscillator set-ups %0d", n_i2c);
    check(n_sync >= 4,      "comma alignment happened on every receiver");
    check(n_slip >= 1,      "16-bit word slip happened");
    check(n_stable >= 4,    "link became stable");
    check(n_loss >= 2,      "link loss happened");
    check(n_stop >= 1,      "STOP flow control happened");
    check(n_resume >= 1,    "flow control resume happened");
    check(n_lack_drop >= 1, "LACK throttling happened");
    check(n_ovf >= 1,       "overflow happened");
    check(n_fifo_rst >= 1,  "FIFO reset happened");
    check(n_irq1[0] >= 1 && n_irq1[1] >= 1, "IRQ1 happened on both boards");
    check(n_irq2[0] >= 1,   "IRQ2 happened");
    check(n_i2c == 2,       "oscillator set-up ran on both boards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
