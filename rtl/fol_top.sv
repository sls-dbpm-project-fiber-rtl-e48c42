// fol_top - firmware of the fibre optical link (FOL) module.
//
// The module connects one SHARC DSP to two neighbouring DSP boards over two
// fibre pairs. Channel 0 is the left neighbour, channel 1 the right one:
//   link port 3 (ch 0) / 4 (ch 1) from the DSP -> dsp2system -> mc_tx ->
//     FIFO -> tx_sync_splitter -> gxb_tx_encoder -> tx_code (to serializer)
//   rx_code (from deserializer) -> gxb_word_aligner -> gxb_rx_decoder ->
//     rx_sync_combiner -> FIFO -> mc_rx -> FIFO -> system2dsp -> ddr_out ->
//     link port 1 (ch 0) / 2 (ch 1) to the DSP
// Flow control: when the DSP-bound FIFO of a channel is half full, or its
// receiver is not stable, the channel's own transmitter sends "stop" words;
// the far end then drops LACK on its link port 3/4 until "idle/ready" words
// arrive again. LACK also falls while the channel's receiver is not stable.
//
// The memory-mapped slave (mem_slave) gives the firmware ID, the link status
// and error counters and holds the link-port speed, FIFO reset and trigger
// registers. irq_error pulses IRQ1 on lost data or a receiver dropping out of
// the stable state; irq_trigger pulses IRQ2 on the selected trigger input.
//
// Clock domains: sclk (phase-compensated DSP clock), sys_clk (system clock,
// which is also the transmitter core clock), rx_clk[i] (recovered receive
// clocks) and the link port LCLK inputs. PLLs, transceiver PMA (serializer,
// deserializer, clock recovery) and calibration are outside this RTL: their
// clocks, lock flags and the 20-bit parallel code words are ports. For the
// reference oscillator set-up, osc_config reads, rewrites, verifies and
// enables the oscillator's registers through the I2C master i2c_link, both in
// the 80 MHz configuration clock domain cfg_clk; osc_ref_en tells when the
// reference may go to the transceiver PLL. Each domain has a reset_gen behind
// its lock flag. Mapping of link ports to fibres follows the module description; the
// FIFO depths, flow-control thresholds and control-word code points are this
// design's choices.
module fol_top
  import fol_pkg::*;
#(
  parameter int unsigned NCH       = 2,
  parameter logic [7:0]  FW_REV    = 8'd0,
  parameter logic [7:0]  FW_DAY    = 8'd1,
  parameter logic [7:0]  FW_MONTH  = 8'd1,
  parameter logic [7:0]  FW_YEAR   = 8'd0,
  parameter int unsigned IRQ_PULSE = 4
) (
  // clocks and PLL lock flags
  input  logic                  sclk,
  input  logic                  pll_dsp_locked,
  input  logic                  sys_clk,
  input  logic                  gxb_tx_locked,
  input  logic [NCH-1:0]        rx_clk,
  input  logic [NCH-1:0]        rx_locked,
  // link ports 3/4: DSP to FPGA
  input  logic [NCH-1:0]        lp_in_lclk,
  input  logic [NCH-1:0][3:0]   lp_in_ldat,
  output logic [NCH-1:0]        lp_in_lack,
  // link ports 1/2: FPGA to DSP
  output logic [NCH-1:0]        lp_out_lclk,
  output logic [NCH-1:0][3:0]   lp_out_ldat,
  input  logic [NCH-1:0]        lp_out_lack,
  // SHARC memory bus
  input  logic                  cs_n,
  input  logic                  rd_n,
  input  logic                  wr_n,
  input  logic [5:0]            addr,
  input  logic [7:0]            wdata,
  output logic [7:0]            rdata,
  output logic                  rdata_oe,
  output logic                  ack,
  // triggers and interrupts
  input  logic                  trg_a,
  input  logic                  trg_b,
  input  logic                  trg_c,
  output logic                  irq1_n,
  output logic                  irq2_n,
  // transceiver parallel interface (two 10-bit symbols, bit 0 first)
  output logic [NCH-1:0][19:0]  tx_code,
  input  logic [NCH-1:0][19:0]  rx_code,
  // reference oscillator configuration: I2C register access
  input  logic                  cfg_clk,
  input  logic                  cfg_pll_locked,
  output logic                  osc_cfg_done,   // oscillator set-up complete
  output logic                  osc_cfg_fail,   // set-up gave up (no answer or no match)
  output logic                  osc_ref_en,     // reference clock may be used
  output logic                  i2c_scl_low,
  output logic                  i2c_sda_low,
  input  logic                  i2c_sda_in
);
  localparam int unsigned DSP_AW = 5;   // DSP-bound FIFO: 32 words
  localparam int unsigned TX_AW  = 4;   // transmitter FIFO: 16 FOL words
  localparam int unsigned RX_AW  = 4;   // receiver FIFO: 16 half words

  cfg_t  cfg;
  stat_t stat;
  logic  rst_sclk, rst_sys;

  reset_gen u_rst_sclk (.clk(sclk),    .locked(pll_dsp_locked), .ext_rst(1'b0), .rst(rst_sclk));
  reset_gen u_rst_sys  (.clk(sys_clk), .locked(gxb_tx_locked),  .ext_rst(1'b0), .rst(rst_sys));

  logic [NCH-1:0] link_stable, err_evt_sclk, tx_act_s1, tx_act_s2;
  logic [NCH-1:0] rx_stable_s1, rx_stable_s2;

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    // ---------------------------------------------------------- resets
    logic rst_rx, rst_lp_in, rst_lp_out_sys, rst_lp_out_sclk;
    reset_gen u_rst_rx      (.clk(rx_clk[i]), .locked(rx_locked[i]),  .ext_rst(1'b0),                   .rst(rst_rx));
    reset_gen u_rst_lp_in   (.clk(sys_clk),   .locked(gxb_tx_locked), .ext_rst(cfg.lp_rx_fifo_rst[i]), .rst(rst_lp_in));
    reset_gen u_rst_lp_osys (.clk(sys_clk),   .locked(gxb_tx_locked), .ext_rst(cfg.lp_tx_fifo_rst[i]), .rst(rst_lp_out_sys));
    reset_gen u_rst_lp_osck (.clk(sclk),      .locked(pll_dsp_locked),.ext_rst(cfg.lp_tx_fifo_rst[i]), .rst(rst_lp_out_sclk));

    // ---------------------------------------------------------- transmit
    logic        w_valid, w_ready, tf_wen, tf_full, tf_empty, tf_ren, fc_sent;
    logic [31:0] w_data;
    fol_word_t   tf_wdata, tf_rdata, tx_word;
    logic [TX_AW:0] tf_wlevel, tf_rlevel;
    logic        tx_allow, stop_req;

    dsp2system u_d2s (
      .lclk(lp_in_lclk[i]), .ldat(lp_in_ldat[i]), .sclk(sclk), .sclk_rst(rst_sclk), .lack(lp_in_lack[i]),
      .tx_allow(tx_allow), .sys_clk(sys_clk), .rst(rst_lp_in),
      .word_valid(w_valid), .word(w_data), .word_ready(w_ready)
    );

    mc_tx u_mc_tx (
      .clk(sys_clk), .rst(rst_lp_in), .word_valid(w_valid), .word(w_data), .word_ready(w_ready),
      .fifo_wen(tf_wen), .fifo_wdata(tf_wdata), .fifo_full(tf_full)
    );

    async_fifo #(.WIDTH($bits(fol_word_t)), .AW(TX_AW)) u_tx_fifo (
      .wclk(sys_clk), .wrst(rst_sys), .wen(tf_wen), .wdata(tf_wdata), .wfull(tf_full), .wlevel(tf_wlevel),
      .rclk(sys_clk), .rrst(rst_sys), .ren(tf_ren), .rdata(tf_rdata), .rempty(tf_empty), .rlevel(tf_rlevel)
    );

    tx_sync_splitter u_split (
      .clk(sys_clk), .rst(rst_sys), .fifo_rdata(tf_rdata), .fifo_empty(tf_empty), .fifo_ren(tf_ren),
      .stop_req(stop_req), .tx_word(tx_word), .fc_sent(fc_sent)
    );

    gxb_tx_encoder u_enc (
      .clk(sys_clk), .rst(rst_sys), .tx_data(tx_word.data), .tx_ctrl(tx_word.ctrl), .code(tx_code[i])
    );

    // ---------------------------------------------------------- receive
    logic [19:0] rx_al;
    logic        byte_sync, remote_stop, rx_lost;
    logic [15:0] rx_data;
    logic [1:0]  rx_ctrl, code_err, disp_err;
    logic        rf_wen, rf_full, rf_empty, rf_ren, rf_rst;
    rx_half_t    rf_wdata, rf_rdata;
    logic [RX_AW:0] rf_wlevel, rf_rlevel;
    logic [7:0]  err_cnt, err_gray;

    gxb_word_aligner u_align (
      .clk(rx_clk[i]), .rst(rst_rx), .rx_raw(rx_code[i]), .rx_aligned(rx_al), .byte_sync(byte_sync)
    );

    gxb_rx_decoder u_dec (
      .clk(rx_clk[i]), .rst(rst_rx), .code(rx_al), .rx_data(rx_data), .rx_ctrl(rx_ctrl),
      .code_err(code_err), .disp_err(disp_err)
    );

    rx_sync_combiner u_comb (
      .clk(rx_clk[i]), .rst(rst_rx), .byte_sync(byte_sync), .rx_data(rx_data), .rx_ctrl(rx_ctrl),
      .rx_err(code_err | disp_err), .fifo_wen(rf_wen), .fifo_wdata(rf_wdata), .fifo_full(rf_full),
      .link_stable(link_stable[i]), .remote_stop(remote_stop), .lost(rx_lost),
      .err_count(err_cnt), .err_count_gray(err_gray)
    );

    // the far end may be sent data while this receiver is stable and not stopped
    always_ff @(posedge rx_clk[i] or posedge rst_rx) begin
      if (rst_rx) tx_allow <= 1'b0;
      else        tx_allow <= link_stable[i] && !remote_stop;
    end

    // the receiver FIFO spans two reset domains; it is cleared by either
    assign rf_rst = rst_rx || rst_sys;
    async_fifo #(.WIDTH($bits(rx_half_t)), .AW(RX_AW)) u_rx_fifo (
      .wclk(rx_clk[i]), .wrst(rf_rst), .wen(rf_wen), .wdata(rf_wdata), .wfull(rf_full), .wlevel(rf_wlevel),
      .rclk(sys_clk), .rrst(rf_rst), .ren(rf_ren), .rdata(rf_rdata), .rempty(rf_empty), .rlevel(rf_rlevel)
    );

    logic        df_wen, df_full, df_empty, df_ren, df_rst, overflow;
    logic [31:0] df_wdata, df_rdata;
    logic [DSP_AW:0] df_wlevel, df_rlevel;
    logic        df_half;

    mc_rx u_mc_rx (
      .clk(sys_clk), .rst(rst_lp_out_sys), .in_valid(!rf_empty), .in_data(rf_rdata), .in_ready(rf_ren),
      .out_wen(df_wen), .out_word(df_wdata), .out_full(df_full), .overflow(overflow)
    );

    assign df_rst = rst_lp_out_sys || rst_lp_out_sclk;
    async_fifo #(.WIDTH(32), .AW(DSP_AW)) u_dsp_fifo (
      .wclk(sys_clk), .wrst(df_rst), .wen(df_wen), .wdata(df_wdata), .wfull(df_full), .wlevel(df_wlevel),
      .rclk(sclk), .rrst(df_rst), .ren(df_ren), .rdata(df_rdata), .rempty(df_empty), .rlevel(df_rlevel)
    );

    // half full: ask the far end to stop
    assign df_half  = (df_wlevel >= (DSP_AW+1)'(2 ** (DSP_AW - 1)));
    assign stop_req = df_half || !link_stable[i];

    logic lclk_h, lclk_l, s2d_busy;
    logic [3:0] s2d_ldat;
    system2dsp u_s2d (
      .clk(sclk), .rst(rst_lp_out_sclk), .full_speed(cfg.lp_full_speed[i]),
      .fifo_rdata(df_rdata), .fifo_empty(df_empty), .fifo_ren(df_ren), .lack_in(lp_out_lack[i]),
      .lclk_h(lclk_h), .lclk_l(lclk_l), .ldat(s2d_ldat), .busy(s2d_busy)
    );

    ddr_out #(.W(5)) u_ddr (
      .clk(sclk), .rst(rst_lp_out_sclk), .d_h({lclk_h, s2d_ldat}), .d_l({lclk_l, s2d_ldat}),
      .q({lp_out_lclk[i], lp_out_ldat[i]})
    );

    // ---------------------------------------------------------- status and errors
    logic ovf_sclk, lost_sclk;
    pulse_sync u_ovf_sync  (.src_clk(sys_clk),   .src_rst(rst_sys), .src_pulse(overflow),
                            .dst_clk(sclk), .dst_rst(rst_sclk), .dst_pulse(ovf_sclk));
    pulse_sync u_lost_sync (.src_clk(rx_clk[i]), .src_rst(rst_rx),  .src_pulse(rx_lost),
                            .dst_clk(sclk), .dst_rst(rst_sclk), .dst_pulse(lost_sclk));
    assign err_evt_sclk[i] = ovf_sclk || lost_sclk;

    logic [7:0] eg1, eg2;
    always_ff @(posedge sclk or posedge rst_sclk) begin
      if (rst_sclk) {eg2, eg1} <= '0;
      else          {eg2, eg1} <= {eg1, err_gray};
    end
    always_comb begin
      stat.rx_err_cnt[i][7] = eg2[7];
      for (int b = 6; b >= 0; b--) stat.rx_err_cnt[i][b] = stat.rx_err_cnt[i][b+1] ^ eg2[b];
    end
  end

  always_ff @(posedge sclk or posedge rst_sclk) begin
    if (rst_sclk) begin
      {tx_act_s2, tx_act_s1}       <= '0;
      {rx_stable_s2, rx_stable_s1} <= '0;
    end else begin
      {tx_act_s2, tx_act_s1}       <= {tx_act_s1, {NCH{!rst_sys}}};
      {rx_stable_s2, rx_stable_s1} <= {rx_stable_s1, link_stable};
    end
  end
  assign stat.tx_active = tx_act_s2;
  assign stat.rx_stable = rx_stable_s2;

  mem_slave #(.FW_REV(FW_REV), .FW_DAY(FW_DAY), .FW_MONTH(FW_MONTH), .FW_YEAR(FW_YEAR)) u_regs (
    .clk(sclk), .rst(rst_sclk), .cs_n(cs_n), .rd_n(rd_n), .wr_n(wr_n), .addr(addr), .wdata(wdata),
    .rdata(rdata), .rdata_oe(rdata_oe), .ack(ack), .cfg(cfg), .stat(stat)
  );

  logic err_seen, trg_seen;
  irq_error #(.NLINK(NCH), .IRQ_PULSE(IRQ_PULSE)) u_irq1 (
    .clk(sclk), .rst(rst_sclk), .err_evt(|err_evt_sclk), .link_stable(link_stable),
    .irq1_n(irq1_n), .evt(err_seen)
  );

  irq_trigger #(.IRQ_PULSE(IRQ_PULSE)) u_irq2 (
    .clk(sclk), .rst(rst_sclk), .trg_a(trg_a), .trg_b(trg_b), .trg_c(trg_c),
    .trg_sel(cfg.trg_sel), .trg_pol(cfg.trg_pol), .irq2_n(irq2_n), .evt(trg_seen)
  );

  // reference oscillator access, held in reset while its PLL is not locked
  logic rst_cfg;
  reset_gen u_rst_cfg (.clk(cfg_clk), .locked(cfg_pll_locked), .ext_rst(1'b0), .rst(rst_cfg));
  logic       i2c_start, i2c_rw, i2c_busy, i2c_done, i2c_ack_err;
  logic [7:0] i2c_reg, i2c_wdata, i2c_rdata;
  osc_config u_osc_cfg (
    .clk(cfg_clk), .rst(rst_cfg), .i2c_start, .i2c_rw, .i2c_reg, .i2c_wdata, .i2c_busy,
    .i2c_done, .i2c_rdata, .i2c_ack_err, .done(osc_cfg_done), .fail(osc_cfg_fail),
    .ref_en(osc_ref_en), .cur_cfg()
  );
  i2c_link u_i2c (
    .clk(cfg_clk), .rst(rst_cfg), .start(i2c_start), .rw(i2c_rw), .reg_addr(i2c_reg), .wdata(i2c_wdata),
    .busy(i2c_busy), .done(i2c_done), .rdata(i2c_rdata), .ack_err(i2c_ack_err),
    .scl_low(i2c_scl_low), .sda_low(i2c_sda_low), .sda_in(i2c_sda_in)
  );
endmodule
