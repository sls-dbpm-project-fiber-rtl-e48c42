// ddr_out - double-data-rate output register built from one rising-edge and
// one falling-edge flip-flop per bit.
//
// On each rising clock edge the output takes d_h and d_l is stored; on the
// following falling edge the output takes the stored d_l. A signal can so
// change twice per clock: the link port 1/2 transmitter uses it to run LCLK
// at the DSP clock rate. The two flip-flops hold a and b with q = a ^ b: the
// rising edge sets a = d_h ^ b, the falling edge sets b = d_l ^ a, so exactly
// one flip-flop changes per edge and q is free of glitches. On an FPGA the
// DDR output cell of the I/O block does the same job and may replace this
// module; its use on the DSP-side outputs follows the block drawings of the
// link-port paths, the XOR structure is this design's choice.
module ddr_out #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d_h,
  input  logic [W-1:0] d_l,
  output logic [W-1:0] q
);
  logic [W-1:0] q_l, a, b;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q_l <= '0;
      a   <= '0;
    end else begin
      q_l <= d_l;
      a   <= d_h ^ b;
    end
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst) b <= '0;
    else     b <= q_l ^ a;
  end

  assign q = a ^ b;
endmodule
