// reset_gen - reset generator of one clock domain.
//
// Holds the domain's logic in reset while its PLL reports no lock (or an
// extra reset request is present) and releases it synchronously HOLD clock
// cycles after both have gone away. Assertion is asynchronous, so a lost lock
// resets the domain at once, even without a running clock. One instance sits
// behind every PLL output of the design (system, DSP and receiver clocks).
//
// Interface: clk, locked (PLL lock status), ext_rst (async, active high),
// rst (active high, deasserted on a rising clk edge).
module reset_gen #(
  parameter int unsigned HOLD = 4
) (
  input  logic clk,
  input  logic locked,
  input  logic ext_rst,
  output logic rst
);
  logic arst;
  logic [$clog2(HOLD+1)-1:0] cnt;

  assign arst = !locked || ext_rst;

  always_ff @(posedge clk or posedge arst) begin
    if (arst) begin
      cnt <= '0;
      rst <= 1'b1;
    end else if (cnt != ($clog2(HOLD+1))'(HOLD)) begin
      cnt <= cnt + 1'b1;
      rst <= 1'b1;
    end else begin
      rst <= 1'b0;
    end
  end
endmodule
