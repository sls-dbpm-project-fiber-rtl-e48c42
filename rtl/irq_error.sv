// irq_error - error observer and IRQ1 pulse generator, in the DSP clock
// domain.
//
// A new error condition event is either a lost-data pulse (err_evt, from the
// receivers' overflow observers, already in this domain) or a receiver link
// that falls out of the stable state after having been stable (link_stable,
// synchronised here). Each event drives irq1_n low for IRQ_PULSE clocks; an
// event during a pulse restarts it. irq1_n is registered. The active-low
// level matches the DSP's interrupt inputs; pulse length is this design's
// choice.
module irq_error #(
  parameter int unsigned NLINK     = 2,
  parameter int unsigned IRQ_PULSE = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             err_evt,
  input  logic [NLINK-1:0] link_stable,
  output logic             irq1_n,
  output logic             evt        // pulse: an error event was seen
);
  logic [NLINK-1:0] ls1, ls2, ls3;
  logic [$clog2(IRQ_PULSE+1)-1:0] cnt;

  assign evt = err_evt || |(ls3 & ~ls2);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      {ls3, ls2, ls1} <= '0;
      cnt    <= '0;
      irq1_n <= 1'b1;
    end else begin
      {ls3, ls2, ls1} <= {ls2, ls1, link_stable};
      if (evt) cnt <= ($bits(cnt))'(IRQ_PULSE - 1);
      else if (cnt != '0) cnt <= cnt - 1'b1;
      irq1_n <= !(evt || cnt != '0);
    end
  end
endmodule
