// Receive elastic buffer with clock correction.
//
// Carries decoded words from the recovered word clock (wr_clk) to the FPGA
// receive clock (rd_clk). The two run at nominally the same rate but from
// different oscillators, so the buffer slowly fills or drains. The idle word
// (comma plus idle character) serves as the clock correction sequence: when
// the read side sees an idle word at the head and fewer than
// CLK_COR_MIN_LAT symbols stored, it sends that word twice (insertion); when
// it sees one with more than CLK_COR_MAX_LAT symbols stored, it drops it
// (removal). After reset, reading starts once CLK_COR_MIN_LAT symbols are
// stored, so in steady state the buffer holds about CLK_COR_MIN_LAT symbols and
// adds that many symbol times of latency (plus the pointer synchronizer).
// Levels are counted in 8-bit symbols, as the transceiver parameter is; a
// word holds two. The document names the buffer, its insertion and removal of
// clock correction symbols and CLK_COR_MIN_LAT; CLK_COR_MAX_LAT, the depth,
// the start-up rule and the error flags are this design's choice.
//
// Write side: din/din_valid, written when din_valid is high (after symbol
// alignment). Read side: dout every rd_clk, registered, with one-cycle pulses
// cc_insert, cc_remove and underflow. level is the read side's view of the
// fill, in words.
module lll_rx_elastic_buffer
  import lll_pkg::*;
#(
  parameter int unsigned DEPTH           = 32,  // words, power of two
  parameter int unsigned CLK_COR_MIN_LAT = 4,   // symbols
  parameter int unsigned CLK_COR_MAX_LAT = CLK_COR_MIN_LAT + 4  // symbols
) (
  input  logic      wr_clk,
  input  logic      rd_clk,
  input  logic      rst_n,
  input  pcs_word_t din,
  input  logic      din_valid,
  output pcs_word_t dout,
  output logic      cc_insert,
  output logic      cc_remove,
  output logic      underflow,
  output logic      overflow,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned MIN_W = (CLK_COR_MIN_LAT + 1) / 2;
  localparam int unsigned MAX_W = (CLK_COR_MAX_LAT + 1) / 2;

  pcs_word_t   mem [DEPTH];
  logic [AW:0] wptr, rptr, wptr_rd, rptr_wr;
  logic        started;
  pcs_word_t   head, next;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side
  always_ff @(posedge wr_clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (din_valid) begin
        if ((wptr - rptr_wr) < (AW+1)'(DEPTH)) begin
          mem[wptr[AW-1:0]] <= din;
          wptr <= wptr + 1'b1;
        end else begin
          overflow <= 1'b1;
        end
      end
    end
  end

  lll_gray_sync #(.W(AW+1)) u_w2r (.dst_clk(rd_clk), .rst_n, .gray_in(bin2gray(wptr)), .bin_out(wptr_rd));
  lll_gray_sync #(.W(AW+1)) u_r2w (.dst_clk(wr_clk), .rst_n, .gray_in(bin2gray(rptr)), .bin_out(rptr_wr));

  assign level = wptr_rd - rptr;
  assign head  = mem[rptr[AW-1:0]];
  assign next  = mem[AW'(rptr[AW-1:0] + 1'b1)];

  // Read side
  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr      <= '0;
      started   <= 1'b0;
      dout      <= IDLE_WORD;
      cc_insert <= 1'b0;
      cc_remove <= 1'b0;
      underflow <= 1'b0;
    end else begin
      cc_insert <= 1'b0;
      cc_remove <= 1'b0;
      underflow <= 1'b0;
      if (!started) begin
        dout <= IDLE_WORD;
        if (32'(level) >= MIN_W) started <= 1'b1;
      end else if (level == '0) begin
        dout      <= IDLE_WORD;
        underflow <= 1'b1;
      end else if (head == IDLE_WORD && 32'(level) < MIN_W) begin
        dout      <= head;            // repeat: rptr stays
        cc_insert <= 1'b1;
      end else if (head == IDLE_WORD && 32'(level) > MAX_W) begin
        dout      <= next;            // drop the idle word at the head
        rptr      <= rptr + (AW+1)'(2);
        cc_remove <= 1'b1;
      end else begin
        dout <= head;
        rptr <= rptr + 1'b1;
      end
    end
  end

  // One clock correction at a time.
  a_one_correction: assert property (@(posedge rd_clk) disable iff (!rst_n)
    !(cc_insert && cc_remove));
endmodule
