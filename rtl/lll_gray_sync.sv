// Two-flop synchronizer for a Gray-coded FIFO pointer.
//
// Brings a binary pointer from another clock domain into dst_clk: the source
// side passes the Gray code of its pointer, this block samples it through two
// flops and converts it back to binary. Output lags the source by two to three
// destination clocks.
module lll_gray_sync #(
  parameter int unsigned W = 5
) (
  input  logic         dst_clk,
  input  logic         rst_n,
  input  logic [W-1:0] gray_in,
  output logic [W-1:0] bin_out
);
  logic [W-1:0] s1, s2;

  always_ff @(posedge dst_clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= gray_in;
      s2 <= s1;
    end
  end

  always_comb begin
    bin_out[W-1] = s2[W-1];
    for (int i = W - 2; i >= 0; i--) bin_out[i] = bin_out[i+1] ^ s2[i];
  end
endmodule
