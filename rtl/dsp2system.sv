// dsp2system - receiver of SHARC link port 3 or 4 (DSP to FPGA).
//
// The DSP drives LCLK and a data nibble on LDAT, renewing the nibble on the
// rising LCLK edge; the FPGA takes it on the falling edge straight into a
// nibble FIFO clocked by LCLK. In the system clock domain the nibbles are read
// out and joined, most significant nibble first, into 32-bit DSP words that
// are offered with a valid/ready handshake to the media converter. A word
// boundary is every eighth nibble counted from reset.
//
// LACK tells the DSP it may send. It is high only when the fibre link of this
// channel is stable and the far end is not asking to stop (tx_allow, any
// domain) and the nibble FIFO has more than LACK_MARGIN free entries, so the
// words the DSP still sends after LACK falls fit. LACK is synchronised into and
// registered in the DSP clock domain. The margin is this design's choice.
//
// Resets: rst (system domain, async) also clears the nibble FIFO.
module dsp2system #(
  parameter int unsigned NIB_AW      = 6,   // nibble FIFO depth 2**NIB_AW
  parameter int unsigned LACK_MARGIN = 24
) (
  input  logic        lclk,
  input  logic [3:0]  ldat,
  input  logic        sclk,
  input  logic        sclk_rst,
  output logic        lack,
  input  logic        tx_allow,
  input  logic        sys_clk,
  input  logic        rst,
  output logic        word_valid,
  output logic [31:0] word,
  input  logic        word_ready
);
  localparam int unsigned DEPTH = 2 ** NIB_AW;

  logic [3:0]      nib;
  logic            nib_empty, nib_ren;
  logic [NIB_AW:0] nib_rlevel, nib_wlevel;
  logic            nib_full;
  logic [2:0]      cnt;
  logic            room;

  // nibbles are taken on the falling LCLK edge
  async_fifo #(.WIDTH(4), .AW(NIB_AW)) u_nib_fifo (
    .wclk(~lclk), .wrst(rst), .wen(1'b1), .wdata(ldat), .wfull(nib_full), .wlevel(nib_wlevel),
    .rclk(sys_clk), .rrst(rst), .ren(nib_ren), .rdata(nib), .rempty(nib_empty), .rlevel(nib_rlevel)
  );

  assign nib_ren = !nib_empty && !word_valid;

  always_ff @(posedge sys_clk or posedge rst) begin
    if (rst) begin
      cnt        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      if (word_valid && word_ready) word_valid <= 1'b0;
      if (nib_ren) begin
        word <= {word[27:0], nib};
        cnt  <= cnt + 1'b1;
        if (cnt == 3'd7) word_valid <= 1'b1;
      end
    end
  end

  assign room = (nib_rlevel < (NIB_AW+1)'(DEPTH - LACK_MARGIN));

  // LACK in the DSP clock domain
  logic room_s1, room_s2, allow_s1, allow_s2;
  always_ff @(posedge sclk or posedge sclk_rst) begin
    if (sclk_rst) begin
      {room_s2, room_s1, allow_s2, allow_s1} <= '0;
      lack <= 1'b0;
    end else begin
      {room_s2, room_s1}   <= {room_s1, room};
      {allow_s2, allow_s1} <= {allow_s1, tx_allow};
      lack <= room_s2 && allow_s2;
    end
  end
endmodule
