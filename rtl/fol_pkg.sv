// fol_pkg - shared types and constants of the fibre optical link (FOL) firmware.
//
// Holds the 8b10b special characters, the FOL protocol control words sent
// over the fibre, the memory-mapped register offsets of the SHARC bus slave,
// the configuration/status structs exchanged with that slave, and the 8b10b
// symbol encoder used by the transmitter and (for checking) by the receiver.
//
// Symbol bit order: a 10-bit symbol is held as {j,h,g,f,i,e,d,c,b,a}, so bit 0
// (a) is the first bit on the fibre. The code tables are the standard 8b10b
// code. The control-word code points (which K character means idle, stop or
// 32-bit marker) are this design's choice; the register offsets and the
// firmware ID string follow the module's register tables.
package fol_pkg;

  // 8b10b control characters (data byte values with K flag set)
  localparam logic [7:0] K28_0 = 8'h1C;
  localparam logic [7:0] K28_2 = 8'h5C;
  localparam logic [7:0] K28_4 = 8'h9C;
  localparam logic [7:0] K28_5 = 8'hBC;

  // K28.5 symbols for both running disparities, bit a in bit 0
  localparam logic [9:0] COMMA_NEG = 10'h17C;
  localparam logic [9:0] COMMA_POS = 10'h283;

  // One transfer on the fibre: 16 data bits and a K flag per byte.
  typedef struct packed {
    logic [1:0]  ctrl;   // ctrl[0] for data[7:0], ctrl[1] for data[15:8]
    logic [15:0] data;   // data[7:0] is sent first
  } fol_word_t;

  // Control words: K28.5 in the first byte (byte alignment), type in the second.
  localparam fol_word_t W_IDLE   = '{ctrl: 2'b11, data: {K28_0, K28_5}}; // idle, ready for data
  localparam fol_word_t W_STOP   = '{ctrl: 2'b11, data: {K28_2, K28_5}}; // idle, stop sending
  localparam fol_word_t W_SYNC32 = '{ctrl: 2'b11, data: {K28_4, K28_5}}; // next half word starts a 32-bit word

  // Receiver FIFO entry: a data half word with its 32-bit boundary mark.
  typedef struct packed {
    logic        mark32;
    logic [15:0] data;
  } rx_half_t;

  // Register word offsets on the SHARC memory bus
  localparam logic [5:0] A_FW_ID     = 6'h00; // 0x00..0x07 "FOLSHARC"
  localparam logic [5:0] A_FW_REV    = 6'h08;
  localparam logic [5:0] A_FW_DAY    = 6'h09;
  localparam logic [5:0] A_FW_MONTH  = 6'h0A;
  localparam logic [5:0] A_FW_YEAR   = 6'h0B;
  localparam logic [5:0] A_TX1_STAT  = 6'h10;
  localparam logic [5:0] A_TX2_STAT  = 6'h11;
  localparam logic [5:0] A_RX1_STAT  = 6'h12;
  localparam logic [5:0] A_RX2_STAT  = 6'h13;
  localparam logic [5:0] A_RX1_ERR   = 6'h14;
  localparam logic [5:0] A_RX2_ERR   = 6'h15;
  localparam logic [5:0] A_LP1_SPEED = 6'h20;
  localparam logic [5:0] A_LP2_SPEED = 6'h21;
  localparam logic [5:0] A_LP1_RST   = 6'h22;
  localparam logic [5:0] A_LP2_RST   = 6'h23;
  localparam logic [5:0] A_TRG_SEL   = 6'h24;
  localparam logic [5:0] A_TRG_POL   = 6'h25;
  localparam logic [5:0] A_LP3_RST   = 6'h26;
  localparam logic [5:0] A_LP4_RST   = 6'h27;

  localparam logic [63:0] FW_ID = "FOLSHARC"; // byte 0 = 'F'

  typedef enum logic [1:0] {TRG_NONE = 2'd0, TRG_A = 2'd1, TRG_B = 2'd2, TRG_C = 2'd3} trg_sel_e;

  // Configuration register outputs (sclk domain)
  typedef struct packed {
    logic [1:0] lp_full_speed;  // link port 1, 2: 1 = full speed
    logic [1:0] lp_tx_fifo_rst; // link port 1, 2 FIFO reset pulses
    logic [1:0] lp_rx_fifo_rst; // link port 3, 4 FIFO reset pulses
    trg_sel_e   trg_sel;
    logic       trg_pol;        // 1 = low active
  } cfg_t;

  // Status register inputs (sclk domain)
  typedef struct packed {
    logic [1:0]      tx_active;
    logic [1:0]      rx_stable;
    logic [1:0][7:0] rx_err_cnt;
  } stat_t;

  // ---------------------------------------------------------------- 8b10b
  // 5b/6b codes for running disparity -, written abcdei (a = MSB here)
  function automatic logic [5:0] enc6_neg(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;  5'd2:  return 6'b101101;
      5'd3:  return 6'b110001;  5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;  5'd8:  return 6'b111001;
      5'd9:  return 6'b100101;  5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;  5'd14: return 6'b011100;
      5'd15: return 6'b010111;  5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;  5'd20: return 6'b001011;
      5'd21: return 6'b101010;  5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;  5'd26: return 6'b010110;
      5'd27: return 6'b110110;  5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b codes for running disparity -, written fghj
  function automatic logic [3:0] enc4_neg(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;  3'd2: return 4'b0101;
      3'd3: return 4'b1100;  3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  function automatic int unsigned ones6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction

  function automatic int unsigned ones4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  function automatic logic k_valid(input logic [7:0] d);
    return (d[4:0] == 5'd28) ||
           (d[7:5] == 3'd7 && (d[4:0] == 5'd23 || d[4:0] == 5'd27 || d[4:0] == 5'd29 || d[4:0] == 5'd30));
  endfunction

  // Encode one byte. rd = 0 means running disparity -, 1 means +.
  // Returns {rd_out, symbol} with symbol bit 0 = a.
  function automatic logic [10:0] enc8b10b(input logic [7:0] d, input logic k, input logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] s6;
    logic [3:0] s4;
    logic       rd_mid, rd_out, alt7;
    logic [9:0] msb_first;
    logic [9:0] sym;
    x = d[4:0];
    y = d[7:5];
    s6 = (k && x == 5'd28) ? 6'b001111 : enc6_neg(x);
    if (rd && (ones6(s6) != 3 || s6 == 6'b111000)) s6 = ~s6;
    rd_mid = (ones6(s6) == 3) ? rd : ~rd;
    alt7 = (y == 3'd7) &&
           (k || (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                 ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    s4 = alt7 ? 4'b0111 : enc4_neg(y);
    // K28.y with y in 1,2,5,6 uses the complemented neutral code
    if (k && x == 5'd28 && (y == 3'd1 || y == 3'd2 || y == 3'd5 || y == 3'd6)) s4 = ~s4;
    if (rd_mid && (ones4(s4) != 2 || s4 == 4'b1100)) s4 = ~s4;
    else if (rd_mid && k && x == 5'd28 && (y == 3'd1 || y == 3'd2 || y == 3'd5 || y == 3'd6)) s4 = ~s4;
    rd_out = (ones4(s4) == 2) ? rd_mid : ~rd_mid;
    msb_first = {s6, s4};
    for (int i = 0; i < 10; i++) sym[i] = msb_first[9-i];
    return {rd_out, sym};
  endfunction

endpackage
