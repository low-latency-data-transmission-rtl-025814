// Shared types and constants of the low latency LLRF link.
//
// The link carries 16-bit words, two 8-bit symbols each, through an 8B/10B
// transceiver. Symbol 0 (bits 7:0) is sent first on the wire. A word is a
// struct of the 16 data bits and one "control" flag per symbol (the K flag of
// 8B/10B). The idle word pairs the comma K28.5 (symbol 0) with the idle
// character (symbol 1), as the frame format shows "Idle | Comma" on each idle
// row. K28.5 as the comma follows from the 10-bit pattern 0101111100 the
// design is built around; K28.0 as the idle character is this design's choice.
package lll_pkg;

  localparam logic [7:0] K28_5 = 8'hBC;  // comma
  localparam logic [7:0] K28_0 = 8'h1C;  // idle / clock correction character

  // Ten-bit form of the comma at negative running disparity, bit 0 sent first.
  localparam logic [9:0] COMMA_NEG = 10'b0101111100;
  localparam logic [9:0] COMMA_POS = ~COMMA_NEG;

  typedef struct packed {
    logic [1:0]  k;     // control flag per symbol, k[0] for data[7:0]
    logic [15:0] data;
  } pcs_word_t;

  localparam pcs_word_t IDLE_WORD = '{k: 2'b11, data: {K28_0, K28_5}};

  // CRC-16 with polynomial x^16 + x^12 + x^5 + 1 (0x1021), initial value
  // 0xFFFF, processed MSB first over I then Q, no final inversion.
  function automatic logic [15:0] crc16_iq(input logic [15:0] i_w, input logic [15:0] q_w);
    logic [15:0] c;
    logic [31:0] d;
    c = 16'hFFFF;
    d = {i_w, q_w};
    for (int b = 31; b >= 0; b--) begin
      if (c[15] ^ d[b]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

endpackage
