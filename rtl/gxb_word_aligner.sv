// gxb_word_aligner - byte (10-bit symbol) alignment of the receive stream.
//
// The deserializer delivers 20 bits per recovered clock with no knowledge of
// where a symbol starts (bit 0 is the oldest bit). The aligner keeps the
// previous 20 bits, searches the 40-bit window for the K28.5 comma symbol of
// either disparity at all 20 starting offsets, and from then on outputs the
// 20 bits that start at that offset modulo 10, so that every output holds two
// whole symbols. Which of the two symbols is the first byte of a 16-bit word
// is left to the 16-bit synchroniser. A comma found at a different offset
// realigns at once.
//
// Timing: rx_aligned and byte_sync are registered, one clock after rx_raw.
module gxb_word_aligner
  import fol_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [19:0] rx_raw,
  output logic [19:0] rx_aligned,
  output logic        byte_sync
);
  logic [19:0] prev;
  logic [39:0] win;
  logic [3:0]  pos;
  logic        found;
  logic [3:0]  found_pos;

  assign win = {rx_raw, prev};

  always_comb begin
    found = 1'b0;
    found_pos = '0;
    for (int q = 19; q >= 0; q--) begin
      if (win[q +: 10] == COMMA_NEG || win[q +: 10] == COMMA_POS) begin
        found = 1'b1;
        found_pos = 4'((q >= 10) ? q - 10 : q);
      end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prev       <= '0;
      pos        <= '0;
      byte_sync  <= 1'b0;
      rx_aligned <= '0;
    end else begin
      prev <= rx_raw;
      if (found) begin
        pos       <= found_pos;
        byte_sync <= 1'b1;
      end
      rx_aligned <= win[6'(found ? found_pos : pos) +: 20];
    end
  end
endmodule
