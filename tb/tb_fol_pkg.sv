// tb_fol_pkg - checks the 8b10b encoder function of fol_pkg.
//
// Known code groups (standard 8b10b table values, written abcdei fghj) are
// compared directly; then every data byte and every valid K character is
// encoded from both running disparities and checked for code properties that
// hold for any correct 8b10b code: 4, 5 or 6 ones, disparity that agrees with
// the running disparity, the returned running disparity, no run of more than
// five equal bits inside a symbol, and distinct codes for distinct bytes.
module tb_fol_pkg;
  import fol_pkg::*;
  int checks = 0, failures = 0;

  // symbol value from an "abcdeifghj" string (a first)
  function automatic logic [9:0] sym(input string s);
    logic [9:0] v;
    for (int i = 0; i < 10; i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  task automatic known(input logic [7:0] d, input logic k, input logic rd, input string s);
    logic [10:0] e;
    e = enc8b10b(d, k, rd);
    checks++;
    if (e[9:0] !== sym(s)) begin
      failures++;
      $display("FAIL %s.%0d.%0d rd%0d got %b exp %s", k ? "K" : "D", d[4:0], d[7:5], rd, e[9:0], s);
    end
  endtask

  logic [9:0] seen [2][512];
  initial begin
    known(8'h00, 0, 0, "1001110100");  known(8'h00, 0, 1, "0110001011");
    known(8'hB5, 0, 0, "1010101010");  known(8'hBC, 1, 0, "0011111010");
    known(8'hBC, 1, 1, "1100000101");  known(8'h1C, 1, 0, "0011110100");
    known(8'h1C, 1, 1, "1100001011");  known(8'h5C, 1, 0, "0011110101");
    known(8'h9C, 1, 0, "0011110010");  known(8'h3C, 1, 0, "0011111001");
    known(8'hFC, 1, 0, "0011111000");  known(8'hF1, 0, 0, "1000110111");
    known(8'hEB, 0, 1, "1101001000");  known(8'h07, 0, 0, "1110001011");
    known(8'h07, 0, 1, "0001110100");  known(8'hF7, 1, 0, "1110101000");
    known(8'h63, 0, 0, "1100011100");  known(8'h4A, 0, 0, "0101010101");
    for (int rd = 0; rd < 2; rd++) begin
      int n;
      n = 0;
      for (int v = 0; v < 512; v++) begin
        logic [7:0] d; logic k; logic [10:0] e; int ones, run, maxrun;
        d = v[7:0]; k = v[8];
        if (k && !k_valid(d)) continue;
        e = enc8b10b(d, k, rd[0]);
        ones = $countones(e[9:0]);
        run = 1; maxrun = 1;
        for (int b = 1; b < 10; b++) begin
          run = (e[b] == e[b-1]) ? run + 1 : 1;
          if (run > maxrun) maxrun = run;
        end
        checks++;
        if (ones < 4 || ones > 6 || (rd == 0 && ones == 4) || (rd == 1 && ones == 6) || maxrun > 5 ||
            e[10] != ((ones == 5) ? rd[0] : (ones == 6))) begin
          failures++;
          $display("FAIL property v=%0h rd=%0d code=%b rdo=%0d", v, rd, e[9:0], e[10]);
        end
        for (int j = 0; j < n; j++) begin
          if (seen[rd][j] == e[9:0]) begin
            failures++; $display("FAIL duplicate code v=%0h", v);
          end
        end
        seen[rd][n] = e[9:0];
        n++;
      end
      checks++;
      if (n != 268) begin failures++; $display("FAIL count %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
