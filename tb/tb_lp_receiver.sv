// tb_lp_receiver - testbench model of a SHARC link port configured as
// receiver (link port 1 or 2). Drives LACK from accept, samples LDAT on the
// falling LCLK edge, rebuilds words (most significant nibble first) and checks
// them against the numbering of tb_lp_sender with the same SEED. With resync
// set, gaps in the numbering and corrupt words are counted as gaps instead of
// failures (used while loss is provoked on purpose).
// Also reports the LCLK period seen inside the last word.
module tb_lp_receiver #(
  parameter logic [7:0] SEED = 8'h00
) (
  input  logic       accept,
  input  logic       enable,
  input  logic       resync,
  output logic       lack,
  input  logic       lclk,
  input  logic [3:0] ldat,
  output int         got,
  output int         bad,
  output int         gaps,
  output int         next_idx,
  output realtime    last_word_time
);
  logic [31:0] sh;
  int n, expect_idx;
  realtime t0;
  assign lack = accept;
  initial begin got = 0; bad = 0; gaps = 0; n = 0; expect_idx = 0; last_word_time = 0; end
  assign next_idx = expect_idx;
  always @(negedge lclk) if (enable) begin
    if (n == 0) t0 = $realtime;
    sh = {sh[27:0], ldat};
    n++;
    if (n == 8) begin
      n = 0;
      last_word_time = $realtime - t0;
      if (sh[31:24] != SEED || sh[23:16] != ~sh[7:0]) begin
        if (resync) gaps++;
        else begin bad++; $display("FAIL rx %h: corrupt word %h", SEED, sh); end
      end else if (int'(sh[15:0]) != expect_idx) begin
        if (resync) begin gaps++; expect_idx = int'(sh[15:0]) + 1; got++; end
        else begin bad++; $display("FAIL rx %h: word %0d expected %0d", SEED, sh[15:0], expect_idx); expect_idx = int'(sh[15:0]) + 1; end
      end else begin
        got++; expect_idx++;
      end
    end
  end
endmodule
