// i2c_link - I2C master for reading and rewriting single registers of the
// external reference oscillator, in the 80 MHz configuration clock domain.
//
// A pulse on start with rw = 0 writes wdata to register reg_addr:
//   START, {DEV_ADDR, W}, reg_addr, wdata, STOP.
// With rw = 1 it reads one register:
//   START, {DEV_ADDR, W}, reg_addr, repeated START, {DEV_ADDR, R}, data
//   (answered by the master with NACK), STOP.
// busy is high during a transfer; done pulses at its end, with rdata valid
// after a read and ack_err set if the device did not acknowledge a byte (the
// transfer then ends with STOP at once). start is ignored while busy.
//
// The bus is open drain: scl_low / sda_low pull the line low, sda_in is the
// line level. One SCL period is four quarters of CLK_DIV clocks each: SDA
// changes in the first (SCL low), SCL is high in the second and third, and
// SDA is sampled at the end of the second. The outputs are registered.
// Clock stretching by the device is not supported.
//
// The purpose of the module (access to the oscillator's control and status
// registers) follows the firmware description; the transfer format is the
// standard I2C register access; DEV_ADDR (0x55) and the 100 kHz rate at an
// 80 MHz clock (CLK_DIV = 200) are this design's choices.
module i2c_link #(
  parameter logic [6:0]  DEV_ADDR = 7'h55,
  parameter int unsigned CLK_DIV  = 200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       rw,        // 1 = read
  input  logic [7:0] reg_addr,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       done,
  output logic [7:0] rdata,
  output logic       ack_err,
  output logic       scl_low,
  output logic       sda_low,
  input  logic       sda_in
);
  typedef enum logic [1:0] {SG_START, SG_BYTE, SG_RBYTE, SG_STOP} seg_e;

  logic       rd_q, first, abort;
  logic [2:0] k;                       // segment index
  logic [3:0] bitn;                    // bit in a byte, 8 = acknowledge
  logic [1:0] q;                       // quarter of the SCL period
  logic [$clog2(CLK_DIV)-1:0] div;
  logic       tick;
  logic [7:0] reg_q, wdata_q, sh;
  seg_e       seg;
  logic [7:0] seg_byte;
  logic [2:0] last_k;

  always_comb begin
    last_k = rd_q ? 3'd6 : 3'd4;
    seg = SG_STOP;
    seg_byte = 8'h00;
    if (rd_q) begin
      unique case (k)
        3'd0, 3'd3: seg = SG_START;
        3'd1, 3'd2, 3'd4: seg = SG_BYTE;
        3'd5: seg = SG_RBYTE;
        default: seg = SG_STOP;
      endcase
    end else begin
      unique case (k)
        3'd0: seg = SG_START;
        3'd1, 3'd2, 3'd3: seg = SG_BYTE;
        default: seg = SG_STOP;
      endcase
    end
    unique case (k)
      3'd1:    seg_byte = {DEV_ADDR, 1'b0};
      3'd2:    seg_byte = reg_q;
      3'd3:    seg_byte = wdata_q;
      3'd4:    seg_byte = {DEV_ADDR, 1'b1};
      default: seg_byte = 8'h00;
    endcase
  end

  assign tick = busy && (div == ($clog2(CLK_DIV))'(CLK_DIV - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; rdata <= '0; ack_err <= 1'b0;
      rd_q <= 1'b0; first <= 1'b0; abort <= 1'b0;
      k <= '0; bitn <= '0; q <= '0; div <= '0;
      reg_q <= '0; wdata_q <= '0; sh <= '0;
      scl_low <= 1'b0; sda_low <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        scl_low <= 1'b0;
        sda_low <= 1'b0;
        if (start) begin
          busy <= 1'b1; rd_q <= rw; reg_q <= reg_addr; wdata_q <= wdata;
          first <= 1'b1; abort <= 1'b0; ack_err <= 1'b0;
          k <= '0; bitn <= '0; q <= '0; div <= '0;
        end
      end else begin
        // line levels of the current quarter
        unique case (seg)
          SG_START: begin scl_low <= (q == 2'd3) || (q == 2'd0 && !first); sda_low <= (q >= 2'd2); end
          SG_STOP:  begin scl_low <= (q == 2'd0);                          sda_low <= (q <= 2'd1); end
          SG_BYTE:  begin scl_low <= (q == 2'd0) || (q == 2'd3);
                          sda_low <= (bitn < 4'd8) && !seg_byte[3'(7 - bitn)]; end
          default:  begin scl_low <= (q == 2'd0) || (q == 2'd3); sda_low <= 1'b0; end
        endcase
        div <= tick ? '0 : div + 1'b1;
        if (tick) begin
          q <= q + 1'b1;
          if (q == 2'd1) begin // middle of SCL high: sample
            if (seg == SG_RBYTE && bitn < 4'd8) sh <= {sh[6:0], sda_in};
            if (seg == SG_BYTE && bitn == 4'd8 && sda_in) begin ack_err <= 1'b1; abort <= 1'b1; end
          end
          if (q == 2'd3) begin
            if ((seg == SG_BYTE || seg == SG_RBYTE) && bitn != 4'd8) begin
              bitn <= bitn + 1'b1;
            end else begin
              bitn  <= '0;
              first <= 1'b0;
              if (k == last_k) begin
                busy <= 1'b0; done <= 1'b1; rdata <= sh;
              end else if (abort) begin
                k <= last_k;
              end else begin
                k <= k + 1'b1;
              end
            end
          end
        end
      end
    end
  end
endmodule
