// gxb_tx_encoder - 8b10b encoder of the double-width transmitter path.
//
// Each transmitter core clock it takes one FOL word (16 data bits, one K flag
// per byte) and produces two 10-bit symbols, 20 code bits, for the
// serializer. The low byte is encoded first and its symbol occupies code[9:0];
// the running disparity left by it is used for the high byte, and the
// disparity after the high byte is kept for the next word. Bit 0 of each
// symbol is the first bit sent. The code is the standard 8b10b code; a K flag
// on a byte that is no valid K character is encoded as data.
//
// Timing: code is registered, one clock after tx_data/tx_ctrl. After reset
// the running disparity is negative.
module gxb_tx_encoder
  import fol_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] tx_data,
  input  logic [1:0]  tx_ctrl,
  output logic [19:0] code
);
  logic        rd;
  logic [10:0] e0, e1;

  always_comb begin
    e0 = enc8b10b(tx_data[7:0],  tx_ctrl[0] && k_valid(tx_data[7:0]),  rd);
    e1 = enc8b10b(tx_data[15:8], tx_ctrl[1] && k_valid(tx_data[15:8]), e0[10]);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rd   <= 1'b0;
      code <= '0;
    end else begin
      rd   <= e1[10];
      code <= {e1[9:0], e0[9:0]};
    end
  end
endmodule
