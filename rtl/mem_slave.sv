// mem_slave - SHARC memory-mapped bus slave with the configuration and status
// registers, in the DSP clock domain.
//
// Register map (word offsets, 8 data bits, unused bits and addresses read 0):
//   0x00-0x07  firmware ID "FOLSHARC" (ASCII, 'F' at 0x00)      read only
//   0x08-0x0B  firmware revision (0 = test), day, month, year    read only
//   0x10/0x11  transmitter 1/2 active (bit 0)                    read only
//   0x12/0x13  receiver 1/2 data stable (bit 0)                  read only
//   0x14/0x15  receiver 1/2 error counter                        read only
//   0x20/0x21  link port 1/2 speed (bit 0: 1 = full, 0 = half)   read/write
//   0x22/0x23  link port 1/2 FIFO reset (0->1 resets)            read/write
//   0x24       trigger select (0 none, 1 A, 2 B, 3 C)            read/write
//   0x25       trigger polarity (bit 0: 1 = low active)          read/write
//   0x26/0x27  link port 3/4 FIFO reset (0->1 resets)            read/write
// All writable registers reset to 0. The map follows the module's register
// tables; the bus timing below is this design's choice.
//
// Bus timing: cs_n, rd_n, wr_n (active low), addr and wdata are sampled on
// the rising sclk edge. A read drives rdata, rdata_oe and ack from the next
// edge for as long as cs_n and rd_n stay low. A write is performed on the first
// edge at which cs_n and wr_n are sampled low, and ack answers it one clock
// later in the same way. A 0->1 write to a FIFO reset bit produces a reset
// pulse of RST_PULSE clocks on the matching cfg.*_fifo_rst bit.
module mem_slave
  import fol_pkg::*;
#(
  parameter logic [7:0]  FW_REV    = 8'd0,
  parameter logic [7:0]  FW_DAY    = 8'd1,
  parameter logic [7:0]  FW_MONTH  = 8'd1,
  parameter logic [7:0]  FW_YEAR   = 8'd0,
  parameter int unsigned RST_PULSE = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       cs_n,
  input  logic       rd_n,
  input  logic       wr_n,
  input  logic [5:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       rdata_oe,
  output logic       ack,
  output cfg_t       cfg,
  input  stat_t      stat
);
  logic [1:0] lp_speed, lp12_rst_bit, lp34_rst_bit;
  logic [1:0] trg_sel_q;
  logic       trg_pol_q;
  logic       wr_q;
  logic [3:0][$clog2(RST_PULSE+1)-1:0] pulse_cnt;  // lp1, lp2, lp3, lp4
  logic [7:0] rd_val;

  wire rd_acc = !cs_n && !rd_n;
  wire wr_acc = !cs_n && !wr_n;

  always_comb begin
    rd_val = '0;
    if (addr <= 6'h07) rd_val = FW_ID[8*(7 - addr[2:0]) +: 8];
    else begin
      unique case (addr)
        A_FW_REV:    rd_val = FW_REV;
        A_FW_DAY:    rd_val = FW_DAY;
        A_FW_MONTH:  rd_val = FW_MONTH;
        A_FW_YEAR:   rd_val = FW_YEAR;
        A_TX1_STAT:  rd_val = {7'd0, stat.tx_active[0]};
        A_TX2_STAT:  rd_val = {7'd0, stat.tx_active[1]};
        A_RX1_STAT:  rd_val = {7'd0, stat.rx_stable[0]};
        A_RX2_STAT:  rd_val = {7'd0, stat.rx_stable[1]};
        A_RX1_ERR:   rd_val = stat.rx_err_cnt[0];
        A_RX2_ERR:   rd_val = stat.rx_err_cnt[1];
        A_LP1_SPEED: rd_val = {7'd0, lp_speed[0]};
        A_LP2_SPEED: rd_val = {7'd0, lp_speed[1]};
        A_LP1_RST:   rd_val = {7'd0, lp12_rst_bit[0]};
        A_LP2_RST:   rd_val = {7'd0, lp12_rst_bit[1]};
        A_TRG_SEL:   rd_val = {6'd0, trg_sel_q};
        A_TRG_POL:   rd_val = {7'd0, trg_pol_q};
        A_LP3_RST:   rd_val = {7'd0, lp34_rst_bit[0]};
        A_LP4_RST:   rd_val = {7'd0, lp34_rst_bit[1]};
        default:     rd_val = '0;
      endcase
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rdata        <= '0;
      rdata_oe     <= 1'b0;
      ack          <= 1'b0;
      wr_q         <= 1'b0;
      lp_speed     <= '0;
      lp12_rst_bit <= '0;
      lp34_rst_bit <= '0;
      trg_sel_q    <= '0;
      trg_pol_q    <= 1'b0;
      pulse_cnt    <= '0;
    end else begin
      ack      <= rd_acc || wr_acc;
      rdata_oe <= rd_acc;
      if (rd_acc) rdata <= rd_val;
      wr_q <= wr_acc;
      for (int i = 0; i < 4; i++)
        if (pulse_cnt[i] != '0) pulse_cnt[i] <= pulse_cnt[i] - 1'b1;
      if (wr_acc && !wr_q) begin
        unique case (addr)
          A_LP1_SPEED: lp_speed[0] <= wdata[0];
          A_LP2_SPEED: lp_speed[1] <= wdata[0];
          A_LP1_RST: begin
            lp12_rst_bit[0] <= wdata[0];
            if (wdata[0] && !lp12_rst_bit[0]) pulse_cnt[0] <= ($bits(pulse_cnt[0]))'(RST_PULSE);
          end
          A_LP2_RST: begin
            lp12_rst_bit[1] <= wdata[0];
            if (wdata[0] && !lp12_rst_bit[1]) pulse_cnt[1] <= ($bits(pulse_cnt[1]))'(RST_PULSE);
          end
          A_TRG_SEL:   trg_sel_q <= wdata[1:0];
          A_TRG_POL:   trg_pol_q <= wdata[0];
          A_LP3_RST: begin
            lp34_rst_bit[0] <= wdata[0];
            if (wdata[0] && !lp34_rst_bit[0]) pulse_cnt[2] <= ($bits(pulse_cnt[2]))'(RST_PULSE);
          end
          A_LP4_RST: begin
            lp34_rst_bit[1] <= wdata[0];
            if (wdata[0] && !lp34_rst_bit[1]) pulse_cnt[3] <= ($bits(pulse_cnt[3]))'(RST_PULSE);
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    cfg.lp_full_speed  = lp_speed;
    cfg.lp_tx_fifo_rst = {pulse_cnt[1] != '0, pulse_cnt[0] != '0};
    cfg.lp_rx_fifo_rst = {pulse_cnt[3] != '0, pulse_cnt[2] != '0};
    cfg.trg_sel        = trg_sel_e'(trg_sel_q);
    cfg.trg_pol        = trg_pol_q;
  end

  // a bus cycle is either a read or a write
  a_rd_wr_excl: assert property (@(posedge clk) disable iff (rst) !(rd_acc && wr_acc));
endmodule
