// Serializer (parallel in, serial out) of the transmit path.
//
// Runs on the bit clock. A 5-bit counter divides it by 20 and produces the
// transmit word clock word_clk, which the transmit PCS runs on. On the last bit
// of each word the shift register loads the next 20-bit word; bit 0 goes out
// first. word_clk rises on the bit clock edge where that load happens, so the
// PCS changes par_in right after the load and par_in is stable for 19 bit
// periods before the next one. The serial output changes on the rising bit
// clock edge. In the transceiver the divider belongs to the PLL; it is
// modelled here with the serializer.
module lll_piso #(
  parameter int unsigned W = 20
) (
  input  logic         ser_clk,
  input  logic         rst_n,
  input  logic [W-1:0] par_in,
  output logic         ser_out,
  output logic         word_clk
);
  logic [$clog2(W)-1:0] cnt;
  logic [W-1:0]         sreg;

  assign ser_out = sreg[0];

  always_ff @(posedge ser_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      sreg     <= '0;
      word_clk <= 1'b0;
    end else begin
      if (32'(cnt) == W - 1) begin
        cnt  <= '0;
        sreg <= par_in;
      end else begin
        cnt  <= cnt + 1'b1;
        sreg <= {1'b0, sreg[W-1:1]};
      end
      word_clk <= (32'(cnt) == W - 1) || (32'(cnt) < W / 2 - 1);
    end
  end
endmodule
