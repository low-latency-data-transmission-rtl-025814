// One low latency link of a distributed LLRF controller, both ends.
//
// The link sends an I/Q sample from one module to another (a DAQ to the
// concentrator, the concentrator to the main controller, the controller to the
// vector modulator) over a multi-gigabit serial line with as little and as
// fixed a latency as possible. A sample travels as a three-word frame (I, Q,
// CRC-16) on a line that otherwise carries idle words (comma and idle
// character). The transmit end is the frame transmitter, the 8B/10B encoder,
// an optional phase adjust FIFO and the serializer; the receive end is the
// deserializer, the comma aligner, the 8B/10B decoder, an optional elastic
// buffer and the frame receiver with its CRC check.
//
// The two buffers are the latency knobs. TX_BUF_EN = 0 bypasses the phase
// adjust FIFO; the transmit user logic must then run on tx_clk_out, the
// serializer's word clock. RX_BUF_EN = 0 bypasses the elastic buffer; the
// receive user logic must then run on rx_clk_out, the word clock recovered
// from the line. With a buffer enabled, the user logic runs on its own clock
// (tx_user_clk, rx_user_clk), which is also passed out on tx_clk_out /
// rx_clk_out. The defaults are the configuration with the lowest latency that
// still frees the receiver from the recovered clock: TX FIFO bypassed, RX
// elastic buffer on with CLK_COR_MIN_LAT = 4 symbols.
//
// Clocks: tx_ser_clk is the transmit bit clock (from the transceiver PLL),
// rx_ser_clk the bit clock recovered from the line (from the CDR); both are
// analog parts outside this RTL. At 3.125 Gb/s a word clock period is 6.4 ns.
// User side: a sample is accepted when tx_iq_valid and tx_iq_ready are high at
// a tx_clk_out edge; it comes out as a one-cycle rx_iq_valid pulse on
// rx_clk_out, or as rx_crc_err if the checksum fails.
module lll_link_top
  import lll_pkg::*;
#(
  parameter bit          TX_BUF_EN       = 1'b0,
  parameter bit          RX_BUF_EN       = 1'b1,
  parameter int unsigned CLK_COR_MIN_LAT = 4,
  parameter int unsigned CLK_COR_MAX_LAT = CLK_COR_MIN_LAT + 4,
  parameter int unsigned RX_BUF_DEPTH    = 32,
  parameter int unsigned TX_FIFO_DEPTH   = 8
) (
  input  logic        rst_n,
  // clocks
  input  logic        tx_ser_clk,
  input  logic        tx_user_clk,
  input  logic        rx_ser_clk,
  input  logic        rx_user_clk,
  output logic        tx_clk_out,
  output logic        rx_clk_out,
  // transmit user interface (tx_clk_out domain)
  input  logic        tx_iq_valid,
  input  logic [15:0] tx_i,
  input  logic [15:0] tx_q,
  output logic        tx_iq_ready,
  // serial line
  output logic        ser_tx,
  input  logic        ser_rx,
  // receive user interface (rx_clk_out domain)
  output logic        rx_iq_valid,
  output logic [15:0] rx_i,
  output logic [15:0] rx_q,
  output logic        rx_crc_err,
  output logic        rx_frame_err,
  // status
  output logic        rx_aligned,      // recovered word clock domain
  output logic        rx_comma_det,
  output logic        rx_realign,
  output logic [1:0]  rx_code_err,
  output logic [1:0]  rx_disp_err,
  output logic        rx_cc_insert,    // rx_clk_out domain
  output logic        rx_cc_remove,
  output logic        rx_buf_underflow,
  output logic        rx_buf_overflow,
  output logic [$clog2(RX_BUF_DEPTH):0] rx_buf_level,  // words, rx_clk_out domain
  output logic        tx_fifo_error
);
  // ---------------- transmit ----------------
  logic        tx_word_clk;
  pcs_word_t   tx_word;
  logic [19:0] tx_code, tx_par;

  assign tx_clk_out = TX_BUF_EN ? tx_user_clk : tx_word_clk;

  lll_frame_tx u_frame_tx (
    .clk(tx_clk_out), .rst_n, .iq_valid(tx_iq_valid), .i_data(tx_i), .q_data(tx_q),
    .iq_ready(tx_iq_ready), .tx_word(tx_word)
  );

  lll_enc8b10b u_enc (.clk(tx_clk_out), .rst_n, .din(tx_word), .code(tx_code));

  if (TX_BUF_EN) begin : g_tx_fifo
    lll_tx_phase_fifo #(.DEPTH(TX_FIFO_DEPTH)) u_tx_fifo (
      .wr_clk(tx_user_clk), .rd_clk(tx_word_clk), .rst_n, .din(tx_code), .dout(tx_par),
      .error(tx_fifo_error)
    );
  end else begin : g_tx_bypass
    assign tx_par            = tx_code;
    assign tx_fifo_error = 1'b0;
  end

  lll_piso u_piso (.ser_clk(tx_ser_clk), .rst_n, .par_in(tx_par), .ser_out(ser_tx), .word_clk(tx_word_clk));

  // ---------------- receive ----------------
  logic        rx_word_clk;
  logic [19:0] rx_raw, rx_aligned_word;
  pcs_word_t   rx_dec;
  pcs_word_t   rx_word;
  logic        dec_valid, rx_word_err;

  lll_sipo u_sipo (.ser_clk(rx_ser_clk), .rst_n, .ser_in(ser_rx), .par_out(rx_raw), .word_clk(rx_word_clk));

  lll_comma_align u_align (
    .clk(rx_word_clk), .rst_n, .raw(rx_raw), .aligned_word(rx_aligned_word),
    .aligned(rx_aligned), .comma_det(rx_comma_det), .realign(rx_realign)
  );

  lll_dec8b10b u_dec (
    .clk(rx_word_clk), .rst_n, .code(rx_aligned_word), .dout(rx_dec),
    .code_err(rx_code_err), .disp_err(rx_disp_err)
  );

  // The decoder output is valid one word after the aligner has locked.
  always_ff @(posedge rx_word_clk or negedge rst_n) begin
    if (!rst_n) dec_valid <= 1'b0;
    else        dec_valid <= rx_aligned;
  end

  if (RX_BUF_EN) begin : g_rx_buf
    assign rx_clk_out = rx_user_clk;
    // A word with a code error is replaced by a word with both control flags
    // set and a data pattern that never matches the idle word, so the frame
    // receiver aborts on it and the buffer never takes it for clock correction.
    lll_rx_elastic_buffer #(
      .DEPTH(RX_BUF_DEPTH), .CLK_COR_MIN_LAT(CLK_COR_MIN_LAT), .CLK_COR_MAX_LAT(CLK_COR_MAX_LAT)
    ) u_rx_buf (
      .wr_clk(rx_word_clk), .rd_clk(rx_user_clk), .rst_n,
      .din((rx_code_err != 2'b00) ? pcs_word_t'{k: 2'b11, data: 16'h0000} : rx_dec),
      .din_valid(dec_valid), .dout(rx_word),
      .cc_insert(rx_cc_insert), .cc_remove(rx_cc_remove),
      .underflow(rx_buf_underflow), .overflow(rx_buf_overflow), .level(rx_buf_level)
    );
    assign rx_word_err = 1'b0;
  end else begin : g_rx_bypass
    assign rx_clk_out       = rx_word_clk;
    assign rx_word          = rx_dec;
    assign rx_word_err      = !dec_valid || (rx_code_err != 2'b00);
    assign rx_cc_insert     = 1'b0;
    assign rx_cc_remove     = 1'b0;
    assign rx_buf_underflow = 1'b0;
    assign rx_buf_overflow  = 1'b0;
    assign rx_buf_level     = '0;
  end

  lll_frame_rx u_frame_rx (
    .clk(rx_clk_out), .rst_n, .rx_word(rx_word), .rx_err(rx_word_err),
    .iq_valid(rx_iq_valid), .i_data(rx_i), .q_data(rx_q),
    .crc_err(rx_crc_err), .frame_err(rx_frame_err)
  );
endmodule
