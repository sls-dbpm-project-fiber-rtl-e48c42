// osc_config - start-up set-up of the external reference oscillator, in the
// 80 MHz configuration clock domain.
//
// After reset (held while the configuration PLL is not locked) the sequencer
// drives an i2c_link master through four phases:
//   1. read the current set-up: registers FIRST_REG .. FIRST_REG+NREG-1;
//   2. write the new set-up TARGET, only the registers that differ from what
//      was read (on a retry, all of them);
//   3. read every register back and compare it with TARGET; on a difference
//      go back to 2, at most RETRIES times;
//   4. write EN_VAL to EN_REG, which enables the oscillator output.
// done then stays high and ref_en releases the reference clock to the
// transceiver PLL. A byte without acknowledge, or a set-up that still differs
// after the retries, ends in fail instead; only a new reset starts again.
// cur_cfg keeps the set-up read in phase 1 (register FIRST_REG in the low byte).
//
// The order read - write - verify - enable follows the firmware description.
// Register numbers and values are parameters: the description gives none,
// so the defaults are placeholders of this design that must be replaced by
// the oscillator's real set-up for 83.3333 MHz.
//
// Interface: clk, rst; the command side of i2c_link (start pulse, rw, reg_addr,
// wdata; busy, done, rdata, ack_err); done, fail, ref_en and cur_cfg
// (registered levels).
module osc_config #(
  parameter int unsigned     NREG      = 6,
  parameter logic [7:0]      FIRST_REG = 8'd7,
  parameter logic [NREG*8-1:0] TARGET  = 48'h50_A2_5C_17_C2_01,
  parameter logic [7:0]      EN_REG    = 8'd135,
  parameter logic [7:0]      EN_VAL    = 8'h40,
  parameter int unsigned     RETRIES   = 2
) (
  input  logic              clk,
  input  logic              rst,
  // to the I2C master
  output logic              i2c_start,
  output logic              i2c_rw,
  output logic [7:0]        i2c_reg,
  output logic [7:0]        i2c_wdata,
  input  logic              i2c_busy,
  input  logic              i2c_done,
  input  logic [7:0]        i2c_rdata,
  input  logic              i2c_ack_err,
  // status
  output logic              done,
  output logic              fail,
  output logic              ref_en,
  output logic [NREG*8-1:0] cur_cfg
);
  typedef enum logic [2:0] {PH_READ, PH_WRITE, PH_VERIFY, PH_ENABLE, PH_DONE, PH_FAIL} phase_e;

  phase_e                        phase;
  logic [$clog2(NREG)-1:0]       idx;
  logic [$clog2(RETRIES+1)-1:0]  tries;
  logic                          waiting, bad;
  logic [7:0]                    tgt, cur;

  assign tgt = TARGET[idx*8 +: 8];
  assign cur = cur_cfg[idx*8 +: 8];
  assign done   = (phase == PH_DONE);
  assign fail   = (phase == PH_FAIL);
  assign ref_en = done;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase     <= PH_READ;
      idx       <= '0;
      tries     <= '0;
      waiting   <= 1'b0;
      bad       <= 1'b0;
      cur_cfg   <= '0;
      i2c_start <= 1'b0;
      i2c_rw    <= 1'b0;
      i2c_reg   <= '0;
      i2c_wdata <= '0;
    end else begin
      i2c_start <= 1'b0;
      if (!waiting && !i2c_busy) begin
        unique case (phase)
          PH_READ, PH_VERIFY: begin
            i2c_start <= 1'b1;
            i2c_rw    <= 1'b1;
            i2c_reg   <= FIRST_REG + 8'(idx);
            waiting   <= 1'b1;
          end
          PH_WRITE: begin
            if (cur != tgt || tries != '0) begin
              i2c_start <= 1'b1;
              i2c_rw    <= 1'b0;
              i2c_reg   <= FIRST_REG + 8'(idx);
              i2c_wdata <= tgt;
              waiting   <= 1'b1;
            end else if (idx == ($clog2(NREG))'(NREG - 1)) begin
              idx   <= '0;
              phase <= PH_VERIFY;
            end else begin
              idx <= idx + 1'b1;
            end
          end
          PH_ENABLE: begin
            i2c_start <= 1'b1;
            i2c_rw    <= 1'b0;
            i2c_reg   <= EN_REG;
            i2c_wdata <= EN_VAL;
            waiting   <= 1'b1;
          end
          default: ;
        endcase
      end else if (waiting && i2c_done) begin
        waiting <= 1'b0;
        if (i2c_ack_err) begin
          phase <= PH_FAIL;
        end else if (phase == PH_ENABLE) begin
          phase <= PH_DONE;
        end else begin
          if (phase == PH_READ) cur_cfg[idx*8 +: 8] <= i2c_rdata;
          if (phase == PH_VERIFY && i2c_rdata != tgt) bad <= 1'b1;
          if (idx != ($clog2(NREG))'(NREG - 1)) begin
            idx <= idx + 1'b1;
          end else begin
            idx <= '0;
            unique case (phase)
              PH_READ:  phase <= PH_WRITE;
              PH_WRITE: phase <= PH_VERIFY;
              default: begin  // end of verify
                if (!bad && i2c_rdata == tgt) begin
                  phase <= PH_ENABLE;
                end else if (tries != ($clog2(RETRIES+1))'(RETRIES)) begin
                  tries <= tries + 1'b1;
                  bad   <= 1'b0;
                  phase <= PH_WRITE;
                end else begin
                  phase <= PH_FAIL;
                end
              end
            endcase
          end
        end
      end
    end
  end
endmodule
