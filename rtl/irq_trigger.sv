// irq_trigger - trigger observer and IRQ2 pulse generator, in the DSP clock
// domain.
//
// The three external trigger inputs are synchronised with two flip-flops. The
// trigger select register picks none (0), A (1), B (2) or C (3); the polarity
// register (1 = low active) is applied, and each inactive-to-active change of
// the selected trigger drives irq2_n low for IRQ_PULSE clocks. Changing the
// selection does not itself count as an event. Default after reset: no
// trigger, high active. irq2_n is registered; the active-low level and the
// pulse length are this design's choice.
module irq_trigger
  import fol_pkg::*;
#(
  parameter int unsigned IRQ_PULSE = 4
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     trg_a,
  input  logic     trg_b,
  input  logic     trg_c,
  input  trg_sel_e trg_sel,
  input  logic     trg_pol,
  output logic     irq2_n,
  output logic     evt
);
  logic [2:0] s1, s2;
  logic       act, act_q;
  trg_sel_e   sel_q;
  logic [$clog2(IRQ_PULSE+1)-1:0] cnt;

  always_comb begin
    unique case (trg_sel)
      TRG_A:   act = s2[0] ^ trg_pol;
      TRG_B:   act = s2[1] ^ trg_pol;
      TRG_C:   act = s2[2] ^ trg_pol;
      default: act = 1'b0;
    endcase
  end

  assign evt = act && !act_q && (sel_q == trg_sel);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s1 <= '0; s2 <= '0;
      act_q  <= 1'b1;
      sel_q  <= TRG_NONE;
      cnt    <= '0;
      irq2_n <= 1'b1;
    end else begin
      s1 <= {trg_c, trg_b, trg_a};
      s2 <= s1;
      act_q <= act;
      sel_q <= trg_sel;
      if (evt) cnt <= ($bits(cnt))'(IRQ_PULSE - 1);
      else if (cnt != '0) cnt <= cnt - 1'b1;
      irq2_n <= !(evt || cnt != '0);
    end
  end
endmodule
