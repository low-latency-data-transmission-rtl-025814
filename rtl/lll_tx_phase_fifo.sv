// Transmit phase adjust FIFO.
//
// Carries encoded 20-bit words from the FPGA transmit clock (wr_clk) to the
// transceiver's word clock (rd_clk). Both clocks come from the same reference
// and have the same frequency, only their phase is unknown, so both pointers
// advance on every cycle of their own clock and their distance stays fixed
// after start-up. At start-up the read side takes the write pointer through a
// Gray-code synchronizer, which lags it by at least two read clocks, and
// starts one word ahead of that synchronized value: the word it first reads
// is already written, and the latency is about two word clocks plus the
// output register. Until then it sends the encoded idle word (K28.5 at
// negative disparity, K28.0). Afterwards it keeps watching the synchronized
// distance and raises error if it leaves the range a frequency-locked pair of
// clocks can produce, which means the clocks are not locked. The document
// names the FIFO and its purpose; depth, start-up rule and error check are
// this design's choice.
module lll_tx_phase_fifo #(
  parameter int unsigned DEPTH = 8   // words, power of two, at least 8
) (
  input  logic        wr_clk,
  input  logic        rd_clk,
  input  logic        rst_n,
  input  logic [19:0] din,
  output logic [19:0] dout,
  output logic        error
);
  localparam int unsigned AW = $clog2(DEPTH);

  // Encoded idle word: K28.5 (RD-) then K28.0 (RD+ after the comma).
  localparam logic [19:0] IDLE_CODE = {10'b1101000011, 10'b0101111100};

  logic [19:0] mem [DEPTH];
  logic [AW:0] wptr, rptr, wptr_rd;
  logic [AW:0] ptr_gap;
  logic        started;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side: one word per clock from reset release on.
  always_ff @(posedge wr_clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
    end else begin
      mem[wptr[AW-1:0]] <= din;
      wptr <= wptr + 1'b1;
    end
  end

  lll_gray_sync #(.W(AW+1)) u_w2r (.dst_clk(rd_clk), .rst_n, .gray_in(bin2gray(wptr)), .bin_out(wptr_rd));

  // Synchronized write pointer minus read pointer; with locked clocks it
  // stays between -2 and +1 (modulo 2*DEPTH).
  assign ptr_gap = wptr_rd - rptr;

  // Read side
  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr    <= '0;
      started <= 1'b0;
      dout    <= IDLE_CODE;
      error   <= 1'b0;
    end else begin
      if (!started) begin
        dout <= IDLE_CODE;
        if (wptr_rd != '0) begin
          started <= 1'b1;
          rptr    <= wptr_rd + 1'b1;
        end
      end else begin
        dout  <= mem[rptr[AW-1:0]];
        rptr  <= rptr + 1'b1;
        error <= !(ptr_gap inside {(AW+1)'(0), (AW+1)'(1), (AW+1)'(2 * DEPTH - 1), (AW+1)'(2 * DEPTH - 2)});
      end
    end
  end
endmodule
