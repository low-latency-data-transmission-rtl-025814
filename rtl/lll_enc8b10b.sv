// 8B/10B encoder of the transmit path, two symbols per clock.
//
// Encodes a 16-bit word (symbol 0 in bits 7:0, sent first) with its two
// control flags into 20 line bits, symbol 0 in bits 9:0. The running disparity
// is carried from symbol 0 to symbol 1 within the word and from word to word
// in a register; it starts negative after reset. The output is registered:
// one clock of latency. The document names the encoder; the code itself is the
// standard 8B/10B, implemented from the tables in lll_8b10b_pkg.
module lll_enc8b10b
  import lll_pkg::*;
  import lll_8b10b_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  pcs_word_t   din,
  output logic [19:0] code
);
  logic rd_q;
  enc_t e0, e1;

  always_comb begin
    e0 = encode(din.data[7:0],  din.k[0], rd_q);
    e1 = encode(din.data[15:8], din.k[1], e0.rd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= 1'b0;
      code <= '0;
    end else begin
      code <= {e1.code, e0.code};
      rd_q <= e1.rd;
    end
  end
endmodule
