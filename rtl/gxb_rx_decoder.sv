// gxb_rx_decoder - 8b10b decoder of the double-width receiver path.
//
// Decodes the two aligned 10-bit symbols of each receiver clock (code[9:0]
// first, then code[19:10]) into 16 data bits and a K flag per byte. Each
// symbol is decoded sub-block by sub-block (6b to 5b, 4b to 3b) and then
// checked by encoding the result again: if the received symbol equals the
// encoding for the current running disparity it is good; if it only equals the
// encoding for the other disparity a disparity error is flagged; otherwise a
// code error is flagged. These flags are the link's error observation: a
// single bit error always yields a code or disparity error at or soon after
// the faulty symbol.
//
// Timing: outputs registered, one clock after code. Running disparity starts
// negative after reset; after a code error it follows the symbol's own
// disparity.
module gxb_rx_decoder
  import fol_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [19:0] code,
  output logic [15:0] rx_data,
  output logic [1:0]  rx_ctrl,
  output logic [1:0]  code_err,
  output logic [1:0]  disp_err
);
  // Decode one symbol; returns {rd_out, disp_err, code_err, k, data}
  function automatic logic [11:0] dec_sym(input logic [9:0] sym, input logic rd);
    logic [5:0]  s6;
    logic [3:0]  s4;
    logic [4:0]  x;
    logic [2:0]  y;
    logic        k28, k, a7, hit6, hit4, derr, cerr, rdo;
    logic [10:0] e, en, ep;
    int unsigned n1;
    s6 = {sym[0], sym[1], sym[2], sym[3], sym[4], sym[5]};
    s4 = {sym[6], sym[7], sym[8], sym[9]};
    x = '0; y = '0; hit6 = 1'b0; hit4 = 1'b0;
    k28 = (s6 == 6'b001111) || (s6 == 6'b110000);
    if (k28) begin
      x = 5'd28; hit6 = 1'b1;
    end else begin
      for (int i = 0; i < 32; i++)
        if (enc6_neg(5'(i)) == s6 ||
            (~enc6_neg(5'(i)) == s6 && (ones6(s6) != 3 || s6 == 6'b000111))) begin
          x = 5'(i); hit6 = 1'b1;
        end
    end
    a7 = (s4 == 4'b0111) || (s4 == 4'b1000);
    if (k28) begin
      for (int j = 0; j < 8; j++) begin
        en = enc8b10b({3'(j), 5'd28}, 1'b1, 1'b0);
        ep = enc8b10b({3'(j), 5'd28}, 1'b1, 1'b1);
        if (en[9:0] == sym || ep[9:0] == sym) begin
          y = 3'(j); hit4 = 1'b1;
        end
      end
    end else if (a7) begin
      y = 3'd7; hit4 = 1'b1;
    end else begin
      for (int j = 0; j < 8; j++)
        if (enc4_neg(3'(j)) == s4 ||
            (~enc4_neg(3'(j)) == s4 && (ones4(s4) != 2 || s4 == 4'b0011))) begin
          y = 3'(j); hit4 = 1'b1;
        end
    end
    k = k28 || (a7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
    derr = 1'b0; cerr = 1'b0;
    e = enc8b10b({y, x}, k, rd);
    if (hit6 && hit4 && e[9:0] == sym) begin
      rdo = e[10];
    end else begin
      e = enc8b10b({y, x}, k, ~rd);
      if (hit6 && hit4 && e[9:0] == sym) begin
        derr = 1'b1; rdo = e[10];
      end else begin
        cerr = 1'b1;
        n1 = 0;
        for (int b = 0; b < 10; b++) n1 += int'(sym[b]);
        rdo = (n1 > 5) ? 1'b1 : (n1 < 5) ? 1'b0 : rd;
      end
    end
    return {rdo, derr, cerr, k, y, x};
  endfunction

  logic        rd;
  logic [11:0] d0, d1;

  always_comb begin
    d0 = dec_sym(code[9:0], rd);
    d1 = dec_sym(code[19:10], d0[11]);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rd       <= 1'b0;
      rx_data  <= '0;
      rx_ctrl  <= '0;
      code_err <= '0;
      disp_err <= '0;
    end else begin
      rd       <= d1[11];
      rx_data  <= {d1[7:0], d0[7:0]};
      rx_ctrl  <= {d1[8], d0[8]};
      code_err <= {d1[9], d0[9]};
      disp_err <= {d1[10], d0[10]};
    end
  end
endmodule
