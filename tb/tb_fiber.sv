// tb_fiber - testbench model of the serial fibre path between a transmitter's
// serializer and a receiver's deserializer. The 20-bit words sent are turned
// into a bit stream (bit 0 first) and regrouped into 20-bit words that start
// OFFSET bits later, as a deserializer without alignment would deliver them.
// connected = 0 delivers all zeros (no light); flip_bit inverts one bit of
// the next word.
module tb_fiber #(
  parameter int OFFSET = 0
) (
  input  logic        clk,
  input  logic [19:0] tx,
  input  logic        connected,
  input  logic        flip_bit,
  output logic [19:0] rx
);
  logic [19:0] prev = '0;
  logic [39:0] win;
  assign win = {tx, prev};
  always @(posedge clk) begin
    prev <= tx;
    if (!connected) rx <= '0;
    else rx <= win[20 - OFFSET +: 20] ^ (flip_bit ? 20'h00010 : 20'h0);
  end
endmodule
