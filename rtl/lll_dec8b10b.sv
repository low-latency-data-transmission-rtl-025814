// 10B/8B decoder of the receive path, two symbols per clock.
//
// Decodes 20 aligned line bits (symbol 0 in bits 9:0, received first) into a
// 16-bit word with one control flag per symbol, and flags per symbol a code
// that is not in the 8B/10B tables (code_err) or a sub-block whose disparity
// breaks the running disparity (disp_err). The running disparity follows the
// received sub-blocks and starts negative after reset. One clock of latency.
module lll_dec8b10b
  import lll_pkg::*;
  import lll_8b10b_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [19:0] code,
  output pcs_word_t   dout,
  output logic [1:0]  code_err,
  output logic [1:0]  disp_err
);
  logic rd_q;
  dec_t d0, d1;

  always_comb begin
    d0 = decode(code[9:0],   rd_q);
    d1 = decode(code[19:10], d0.rd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q     <= 1'b0;
      dout     <= '0;
      code_err <= '0;
      disp_err <= '0;
    end else begin
      dout     <= '{k: {d1.k, d0.k}, data: {d1.b, d0.b}};
      code_err <= {d1.code_err, d0.code_err};
      disp_err <= {d1.disp_err, d0.disp_err};
      rd_q     <= d1.rd;
    end
  end
endmodule
