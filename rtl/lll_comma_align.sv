// Comma detection and symbol alignment of the receive path.
//
// The deserializer delivers 20 bits per word clock at an arbitrary bit offset
// from the transmitter's symbol boundaries. This block keeps the previous word,
// forms a 40-bit window (older bits low, as they came off the line) and looks
// at all 20 bit offsets for the comma K28.5 in either disparity, 0101111100 or
// its complement. When it finds one it locks to that offset, so the comma
// lands in symbol 0 of the output word (the frame format puts the comma there).
// Each later comma at a different offset moves the lock (realign pulse).
// Output: the aligned 20 bits, one clock after the raw word; aligned goes high
// with the first comma and stays high.
module lll_comma_align
  import lll_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [19:0] raw,
  output logic [19:0] aligned_word,
  output logic        aligned,
  output logic        comma_det,
  output logic        realign
);
  logic [19:0] prev;
  logic [39:0] win;
  logic [4:0]  offset;
  logic        found;
  logic [4:0]  found_off;

  assign win = {raw, prev};

  always_comb begin
    found     = 1'b0;
    found_off = '0;
    for (int o = 19; o >= 0; o--) begin
      if (win[o +: 10] == COMMA_NEG || win[o +: 10] == COMMA_POS) begin
        found     = 1'b1;
        found_off = 5'(o);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev         <= '0;
      offset       <= '0;
      aligned      <= 1'b0;
      aligned_word <= '0;
      comma_det    <= 1'b0;
      realign      <= 1'b0;
    end else begin
      prev      <= raw;
      comma_det <= found;
      realign   <= found && (found_off != offset || !aligned);
      if (found) begin
        offset       <= found_off;
        aligned      <= 1'b1;
        aligned_word <= win[{1'b0, found_off} +: 20];
      end else begin
        aligned_word <= win[{1'b0, offset} +: 20];
      end
    end
  end
endmodule
