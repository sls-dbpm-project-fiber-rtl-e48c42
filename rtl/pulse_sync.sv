// pulse_sync - carries single-cycle event pulses from one clock domain to
// another.
//
// Each source pulse flips a toggle flip-flop; the destination passes the
// toggle through two flip-flops and emits one pulse per observed change.
// Latency is two to three destination clocks. Source pulses must be at least
// three destination clocks apart to be counted separately. Used for the lost
// data events that feed the IRQ1 error observer.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic tgl, s1, s2, s3;

  always_ff @(posedge src_clk or posedge src_rst) begin
    if (src_rst)        tgl <= 1'b0;
    else if (src_pulse) tgl <= ~tgl;
  end

  always_ff @(posedge dst_clk or posedge dst_rst) begin
    if (dst_rst) {s3, s2, s1} <= '0;
    else         {s3, s2, s1} <= {s2, s1, tgl};
  end

  assign dst_pulse = s3 ^ s2;
endmodule
