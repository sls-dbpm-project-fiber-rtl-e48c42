// async_fifo - dual-clock FIFO that decouples two clock domains.
//
// Used wherever the FOL data path changes clock: link port LCLK to system
// clock, system clock to transmitter core clock, recovered receive clock to
// system clock and system clock to DSP clock. Standard structure: binary
// pointers with one extra wrap bit, Gray-coded copies crossed through two
// flip-flops into the other domain. Full and empty are exact on their own side
// and conservative across (a crossing delays them by two to three clocks).
//
// Interface: write side wclk/wrst/wen/wdata/wfull/wlevel, read side
// rclk/rrst/ren/rdata/rempty/rlevel. rdata shows the head entry whenever
// rempty is low (first-word fall-through); ren pops it. Writes while full and
// reads while empty are ignored. Resets are asynchronous, active high, and
// should be asserted on both sides together.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 4     // depth = 2**AW
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic [AW:0]      wlevel,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty,
  output logic [AW:0]      rlevel
);
  localparam int unsigned DEPTH = 2 ** AW;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rptr_w, wptr_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  always_ff @(posedge wclk) begin
    if (wen && !wfull) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or posedge wrst) begin
    if (wrst) begin
      wptr     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wen && !wfull) begin
        wptr  <= wptr + 1'b1;
        wgray <= bin2gray(wptr + 1'b1);
      end
    end
  end

  assign rptr_w = gray2bin(rgray_w2);
  assign wlevel = wptr - rptr_w;
  assign wfull  = (wlevel == (AW+1)'(DEPTH));

  // read side
  always_ff @(posedge rclk or posedge rrst) begin
    if (rrst) begin
      rptr     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (ren && !rempty) begin
        rptr  <= rptr + 1'b1;
        rgray <= bin2gray(rptr + 1'b1);
      end
    end
  end

  assign wptr_r = gray2bin(wgray_r2);
  assign rlevel = wptr_r - rptr;
  assign rempty = (rlevel == '0);
  assign rdata  = mem[rptr[AW-1:0]];

endmodule
