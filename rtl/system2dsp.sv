// system2dsp - transmitter of SHARC link port 1 or 2 (FPGA to DSP), in the
// DSP clock domain.
//
// When the DSP's LACK (taken in by an input register) is high and the
// DSP-bound FIFO holds a word, the word is popped and sent as eight nibbles,
// most significant first. Each nibble starts with a rising LCLK edge, on which
// LDAT changes, and the DSP takes it on the falling edge. LACK is checked
// before each word only. LCLK idles low.
//
// Speed (configuration register, 1 = full): at full speed LCLK runs at the
// DSP clock, one nibble per clock, LCLK high in the first half of the clock
// and low in the second; at half speed one nibble takes two clocks, LCLK high
// in the first and low in the second. The outputs are given as the values for
// the high and low clock phases (lclk_h, lclk_l) for a DDR output register;
// LDAT holds for the whole clock.
//
// Timing: outputs registered; a word takes 8 clocks at full speed and 16 at
// half speed, plus one idle clock between words.
module system2dsp (
  input  logic        clk,
  input  logic        rst,
  input  logic        full_speed,
  input  logic [31:0] fifo_rdata,
  input  logic        fifo_empty,
  output logic        fifo_ren,
  input  logic        lack_in,
  output logic        lclk_h,
  output logic        lclk_l,
  output logic [3:0]  ldat,
  output logic        busy
);
  logic        ack_q;
  logic [31:0] sh;
  logic [2:0]  cnt;
  logic        phase;

  assign fifo_ren = !busy && ack_q && !fifo_empty;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ack_q  <= 1'b0;
      busy   <= 1'b0;
      sh     <= '0;
      cnt    <= '0;
      phase  <= 1'b0;
      lclk_h <= 1'b0;
      lclk_l <= 1'b0;
      ldat   <= '0;
    end else begin
      ack_q <= lack_in;
      if (!busy) begin
        lclk_h <= 1'b0;
        lclk_l <= 1'b0;
        if (fifo_ren) begin
          busy  <= 1'b1;
          sh    <= fifo_rdata;
          cnt   <= '0;
          phase <= 1'b0;
        end
      end else if (full_speed || !phase) begin
        // start a nibble
        ldat   <= sh[31:28];
        sh     <= {sh[27:0], 4'h0};
        lclk_h <= 1'b1;
        lclk_l <= !full_speed;
        phase  <= !full_speed;
        if (full_speed) begin
          cnt <= cnt + 1'b1;
          if (cnt == 3'd7) busy <= 1'b0;
        end
      end else begin
        // second clock of a half-speed nibble
        lclk_h <= 1'b0;
        lclk_l <= 1'b0;
        phase  <= 1'b0;
        cnt    <= cnt + 1'b1;
        if (cnt == 3'd7) busy <= 1'b0;
      end
    end
  end
endmodule
