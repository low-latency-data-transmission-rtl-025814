// CRC-16 generator of the link frame.
//
// Computes the 16-bit checksum sent as the third word of each frame, over the
// in-phase word followed by the quadrature word (32 bits, MSB first). The
// frame carries a 16-bit CRC; the polynomial (0x1021, CCITT), the initial value
// 0xFFFF and the bit order are this design's choice. Purely combinational: the
// frame transmitter and receiver each use one instance.
module lll_crc16 (
  input  logic [15:0] i_word,
  input  logic [15:0] q_word,
  output logic [15:0] crc
);
  always_comb crc = lll_pkg::crc16_iq(i_word, q_word);
endmodule
