// tb_ddr_out - checks the DDR output register: the output shows the registered high-phase value while the
// clock is high and the low-phase value while it is low.
module tb_ddr_out;
  logic clk = 0, rst = 1;
  logic [4:0] dh = '0, dl = '0, q, eh, el;
  int checks = 0, failures = 0;
  ddr_out #(.W(5)) dut (.clk, .rst, .d_h(dh), .d_l(dl), .q);
  always #10 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); #2;
      dh = 5'($urandom); dl = 5'($urandom); eh = dh; el = dl;
      @(posedge clk); #5;
      checks++; if (q !== eh) begin failures++; $display("FAIL high phase %h exp %h", q, eh); end
      dh = 5'($urandom); dl = 5'($urandom);
      @(negedge clk); #5;
      checks++; if (q !== el) begin failures++; $display("FAIL low phase %h exp %h", q, el); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
