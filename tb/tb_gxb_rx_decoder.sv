// tb_gxb_rx_decoder - checks the double-width 8b10b decoder.
//
// A stream of random data and K bytes is encoded in the testbench with the
// package encoder (tracking disparity there) and fed to the decoder; every
// decoded byte and K flag is compared and no error may be flagged. Then
// single bit errors are injected into chosen symbols; each must raise a code
// or disparity error on that word or the next two.
module tb_gxb_rx_decoder;
  import fol_pkg::*;
  logic clk = 0, rst = 1;
  logic [19:0] code = '0;
  logic [15:0] rx_data;
  logic [1:0]  rx_ctrl, cerr, derr;
  int checks = 0, failures = 0, detected = 0, injected = 0;
  logic rd;

  gxb_rx_decoder dut (.clk, .rst, .code, .rx_data, .rx_ctrl, .code_err(cerr), .disp_err(derr));
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [8:0] rnd_byte();
    if ($urandom_range(0, 7) == 0) begin
      int unsigned r = $urandom_range(0, 11);
      if (r < 8) return {1'b1, 3'(r), 5'd28};
      return {1'b1, (r == 8) ? 8'hF7 : (r == 9) ? 8'hFB : (r == 10) ? 8'hFD : 8'hFE};
    end
    return {1'b0, 8'($urandom)};
  endfunction

  logic [17:0] exp_q[$];
  int errs_window;
  initial begin
    rd = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    // clean stream
    for (int i = 0; i < 3000; i++) begin
      logic [8:0] b0, b1; logic [10:0] e0, e1;
      b0 = rnd_byte(); b1 = rnd_byte();
      e0 = enc8b10b(b0[7:0], b0[8], rd);
      e1 = enc8b10b(b1[7:0], b1[8], e0[10]);
      rd = e1[10];
      code <= {e1[9:0], e0[9:0]};
      exp_q.push_back({b1[8], b0[8], b1[7:0], b0[7:0]});
      @(posedge clk); #1;
      begin
        logic [17:0] ex;
        ex = exp_q.pop_front();
        checks++;
        if ({rx_ctrl, rx_data} !== ex || cerr != 0 || derr != 0) begin
          failures++; $display("FAIL word %0d got %h/%b err %b%b exp %h", i, rx_data, rx_ctrl, cerr, derr, ex);
        end
      end
    end
    // single bit errors, each followed by clean words
    for (int i = 0; i < 200; i++) begin
      errs_window = 0;
      for (int j = 0; j < 4; j++) begin
        logic [8:0] b0, b1; logic [10:0] e0, e1; logic [19:0] w;
        b0 = rnd_byte(); b1 = rnd_byte();
        e0 = enc8b10b(b0[7:0], b0[8], rd);
        e1 = enc8b10b(b1[7:0], b1[8], e0[10]);
        rd = e1[10];
        w = {e1[9:0], e0[9:0]};
        if (j == 0) begin w[$urandom_range(0, 19)] ^= 1'b1; injected++; end
        code <= w;
        @(posedge clk); #1;
        if (cerr != 0 || derr != 0) errs_window++;
      end
      // clean words after the error: disparity errors show up here at the latest
      for (int j = 0; j < 8; j++) begin
        logic [8:0] b0; logic [10:0] e0, e1;
        b0 = rnd_byte();
        e0 = enc8b10b(b0[7:0], b0[8], rd); e1 = enc8b10b(8'h00, 1'b0, e0[10]); rd = e1[10];
        code <= {e1[9:0], e0[9:0]};
        @(posedge clk); #1;
        if (cerr != 0 || derr != 0) errs_window++;
      end
      checks++;
      if (errs_window == 0) begin failures++; $display("FAIL bit error %0d not detected", i); end
      else detected++;
    end
    $display("bit errors injected %0d detected %0d", injected, detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
