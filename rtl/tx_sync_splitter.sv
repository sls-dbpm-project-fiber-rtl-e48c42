// tx_sync_splitter - word source of the transmitter, in the transmitter core
// clock domain.
//
// Every core clock one FOL word goes to the 8b10b encoder. Priority:
//   1. a change of the flow-control state (stop_req, synchronised here) is
//      announced at once with a stop or idle/ready control word;
//   2. otherwise the next FIFO entry (marker or data half word) is sent;
//   3. otherwise an idle word is sent that repeats the current state.
// Idle words carry K28.5 in their first byte, so the far receiver can align
// while the link is idle. After reset the state is "stop" and only stop words
// are sent until stop_req has been low for two clocks.
//
// Interface: FIFO head fifo_rdata with fifo_empty, pop with fifo_ren;
// stop_req asynchronous level; tx_word registered (one clock after the pop).
module tx_sync_splitter
  import fol_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  fol_word_t fifo_rdata,
  input  logic      fifo_empty,
  output logic      fifo_ren,
  input  logic      stop_req,
  output fol_word_t tx_word,
  output logic      fc_sent      // pulse: a flow-control change was sent
);
  logic stop_s1, stop_s2, stop_sent;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) {stop_s2, stop_s1} <= 2'b11;
    else     {stop_s2, stop_s1} <= {stop_s1, stop_req};
  end

  assign fifo_ren = (stop_s2 == stop_sent) && !fifo_empty;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      stop_sent <= 1'b1;
      tx_word   <= W_STOP;
      fc_sent   <= 1'b0;
    end else begin
      fc_sent <= 1'b0;
      if (stop_s2 != stop_sent) begin
        stop_sent <= stop_s2;
        tx_word   <= stop_s2 ? W_STOP : W_IDLE;
        fc_sent   <= 1'b1;
      end else if (!fifo_empty) begin
        tx_word <= fifo_rdata;
      end else begin
        tx_word <= stop_sent ? W_STOP : W_IDLE;
      end
    end
  end
endmodule
