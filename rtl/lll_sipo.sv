// Deserializer (serial in, parallel out) of the receive path.
//
// Runs on the recovered bit clock. Bits enter a shift register at the top, so
// after 20 bits the first one received sits in bit 0. A 5-bit counter divides
// the bit clock by 20; every 20th bit the full word is copied to par_out and
// the recovered word clock word_clk rises, so par_out is stable for the whole
// word clock period. The word boundary is arbitrary; the comma aligner finds
// the symbol boundaries afterwards.
module lll_sipo #(
  parameter int unsigned W = 20
) (
  input  logic         ser_clk,
  input  logic         rst_n,
  input  logic         ser_in,
  output logic [W-1:0] par_out,
  output logic         word_clk
);
  logic [$clog2(W)-1:0] cnt;
  logic [W-2:0]         sreg;

  always_ff @(posedge ser_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      sreg     <= '0;
      par_out  <= '0;
      word_clk <= 1'b0;
    end else begin
      sreg <= {ser_in, sreg[W-2:1]};
      if (32'(cnt) == W - 1) begin
        cnt     <= '0;
        par_out <= {ser_in, sreg};
      end else begin
        cnt <= cnt + 1'b1;
      end
      word_clk <= (32'(cnt) == W - 1) || (32'(cnt) < W / 2 - 1);
    end
  end
endmodule
