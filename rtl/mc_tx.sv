// mc_tx - transmit half of the media converter (FOL protocol generator).
//
// Takes 32-bit DSP words from the link port receiver and writes, for each
// word, three FOL words into the transmitter FIFO: the 32-bit boundary marker
// (a control word), the high half word and the low half word (data words, K
// flags clear). The marker lets the far receiver rebuild the 32-bit word
// boundary. Sending a marker before every word and the half-word order are
// this design's reading of the protocol description.
//
// Interface: word_valid/word/word_ready is a valid/ready handshake; word must
// stay stable while word_valid is high. The FIFO side writes one entry per
// clock while fifo_full is low. A word takes three clocks; word_ready pulses in
// the clock the low half word is written.
module mc_tx
  import fol_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        word_valid,
  input  logic [31:0] word,
  output logic        word_ready,
  output logic        fifo_wen,
  output fol_word_t   fifo_wdata,
  input  logic        fifo_full
);
  typedef enum logic [1:0] {PH_MARK, PH_HI, PH_LO} phase_e;
  phase_e phase;

  always_comb begin
    fifo_wen   = word_valid && !fifo_full;
    word_ready = fifo_wen && (phase == PH_LO);
    unique case (phase)
      PH_MARK: fifo_wdata = W_SYNC32;
      PH_HI:   fifo_wdata = '{ctrl: 2'b00, data: word[31:16]};
      default: fifo_wdata = '{ctrl: 2'b00, data: word[15:0]};
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) phase <= PH_MARK;
    else if (fifo_wen) begin
      unique case (phase)
        PH_MARK: phase <= PH_HI;
        PH_HI:   phase <= PH_LO;
        default: phase <= PH_MARK;
      endcase
    end
  end

  // the word must not change while it is being sent
  property p_word_stable;
    @(posedge clk) disable iff (rst) (word_valid && !word_ready) |=> (word_valid && $stable(word));
  endproperty
  a_word_stable: assert property (p_word_stable);
endmodule
