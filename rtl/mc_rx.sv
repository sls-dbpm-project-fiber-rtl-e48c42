// mc_rx - receive half of the media converter, in the system clock domain.
//
// Reads marked half words from the receiver FIFO and joins them into 32-bit
// DSP words for the DSP-bound FIFO: a marked half word is the high half, the
// next unmarked one the low half. An unmarked half word while a high half is
// awaited is discarded, and a marked one while a low half is awaited starts a
// new word, so the 32-bit boundary is regained after any loss. If the
// DSP-bound FIFO is full when a word is complete, the word is dropped and
// overflow pulses: this is the "data lost" error that raises IRQ1.
//
// Interface: in_valid/in_data/in_ready pops the receiver FIFO (first-word
// fall-through); out_wen/out_word write the DSP-bound FIFO. One half word per
// clock. The block never stalls its input (a full output FIFO drops words
// instead), so in_ready simply follows in_valid; the handshake is kept so
// that a stalling variant fits the same port list.
module mc_rx
  import fol_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  rx_half_t    in_data,
  output logic        in_ready,
  output logic        out_wen,
  output logic [31:0] out_word,
  input  logic        out_full,
  output logic        overflow
);
  logic        have_hi;
  logic [15:0] hi;

  assign in_ready = in_valid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      have_hi  <= 1'b0;
      hi       <= '0;
      out_wen  <= 1'b0;
      out_word <= '0;
      overflow <= 1'b0;
    end else begin
      out_wen  <= 1'b0;
      overflow <= 1'b0;
      if (in_valid) begin
        if (in_data.mark32) begin
          have_hi <= 1'b1;
          hi      <= in_data.data;
        end else if (have_hi) begin
          have_hi <= 1'b0;
          if (out_full) overflow <= 1'b1;
          else begin
            out_wen  <= 1'b1;
            out_word <= {hi, in_data.data};
          end
        end
      end
    end
  end
endmodule
