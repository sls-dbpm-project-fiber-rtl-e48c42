// rx_sync_combiner - 16-bit word synchroniser of a receiver, in the recovered
// receiver clock domain.
//
// Input are the decoded byte pairs of gxb_rx_decoder, already aligned to
// symbol boundaries but possibly one byte off the 16-bit word boundary. The
// block keeps the previous pair and views the stream either as received or
// shifted by one byte. If the view shows K28.5 in the second (high) byte, the
// view flips. A FOL control word in the view (K28.5 first) sets word
// synchronisation; link_stable is word synchronisation while the aligner
// holds byte synchronisation and no 8b10b error is seen. Any error clears it
// until the next control word.
//
// While stable: data words (no K flags) go to the receiver FIFO, marked when
// a 32-bit marker preceded them; stop/idle words set/clear remote_stop;
// idle and marker words are not stored. remote_stop is high whenever the link
// is not stable. err_count counts clocks with an 8b10b error, saturating at
// 255, and is also given Gray-coded for crossing into another clock domain.
//
// Timing: all outputs registered; a word reaches the FIFO write port one
// clock after it is presented.
module rx_sync_combiner
  import fol_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        byte_sync,
  input  logic [15:0] rx_data,
  input  logic [1:0]  rx_ctrl,
  input  logic [1:0]  rx_err,
  output logic        fifo_wen,
  output rx_half_t    fifo_wdata,
  input  logic        fifo_full,
  output logic        link_stable,
  output logic        remote_stop,
  output logic        lost,          // pulse: half word dropped, FIFO full
  output logic [7:0]  err_count,
  output logic [7:0]  err_count_gray
);
  logic [7:0] prev_hi;
  logic       prev_hi_k, prev_hi_err;
  logic       slip;
  fol_word_t  w;
  logic       w_err;
  logic       mark_pend;
  logic       is_ctl;

  always_comb begin
    if (slip) begin
      w     = '{ctrl: {rx_ctrl[0], prev_hi_k}, data: {rx_data[7:0], prev_hi}};
      w_err = rx_err[0] || prev_hi_err;
    end else begin
      w     = '{ctrl: rx_ctrl, data: rx_data};
      w_err = |rx_err;
    end
    is_ctl = (w.ctrl == 2'b11) && (w.data[7:0] == K28_5) &&
             (w.data[15:8] == K28_0 || w.data[15:8] == K28_2 || w.data[15:8] == K28_4);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prev_hi     <= '0;
      prev_hi_k   <= 1'b0;
      prev_hi_err <= 1'b0;
      slip        <= 1'b0;
      link_stable <= 1'b0;
      remote_stop <= 1'b1;
      mark_pend   <= 1'b0;
      fifo_wen    <= 1'b0;
      fifo_wdata  <= '0;
      lost        <= 1'b0;
      err_count   <= '0;
    end else begin
      prev_hi     <= rx_data[15:8];
      prev_hi_k   <= rx_ctrl[1];
      prev_hi_err <= rx_err[1];
      fifo_wen    <= 1'b0;
      lost        <= 1'b0;
      if (byte_sync && |rx_err && err_count != 8'hFF) err_count <= err_count + 1'b1;

      if (!byte_sync || w_err) begin
        link_stable <= 1'b0;
        remote_stop <= 1'b1;
        mark_pend   <= 1'b0;
      end else if (w.ctrl[1] && w.data[15:8] == K28_5) begin
        // comma in the second byte: 16-bit boundary is one byte off
        slip        <= ~slip;
        link_stable <= 1'b0;
        remote_stop <= 1'b1;
        mark_pend   <= 1'b0;
      end else if (is_ctl) begin
        link_stable <= 1'b1;
        if (w.data[15:8] == K28_4) mark_pend <= 1'b1;
        else remote_stop <= (w.data[15:8] == K28_2);
      end else if (link_stable && w.ctrl == 2'b00) begin
        if (fifo_full) lost <= 1'b1;
        else begin
          fifo_wen   <= 1'b1;
          fifo_wdata <= '{mark32: mark_pend, data: w.data};
        end
        mark_pend <= 1'b0;
      end
    end
  end

  assign err_count_gray = err_count ^ (err_count >> 1);
endmodule
