// Latency probe for the Table-style latency comparison: one link in a given
// buffer configuration, looped back through a 5 ns line, fed with NFRAMES
// samples, one every 16 word clocks. It checks every sample arrives unchanged
// and records the smallest, largest and mean latency from the transmit
// acceptance edge to the receive valid pulse. Used by tb_lll_link_latency.
module lll_lat_probe #(
  parameter bit TX_BUF_EN       = 1'b0,
  parameter bit RX_BUF_EN       = 1'b1,
  parameter int CLK_COR_MIN_LAT = 4,
  parameter int NFRAMES         = 60
) (
  input  logic tx_ser_clk,
  input  logic tx_user_clk,
  input  logic rx_user_clk,
  input  logic rst_n,
  output logic done,
  output int   errors
);
  import lll_pkg::*;

  logic        tx_clk_out, rx_clk_out, tx_iq_ready, ser_tx, ser_rx;
  logic        tx_iq_valid = 1'b0;
  logic [15:0] tx_i = '0, tx_q = '0;
  logic        rx_iq_valid, rx_crc_err, rx_frame_err;
  logic [15:0] rx_i, rx_q;

  lll_link_top #(.TX_BUF_EN(TX_BUF_EN), .RX_BUF_EN(RX_BUF_EN), .CLK_COR_MIN_LAT(CLK_COR_MIN_LAT)) u_link (
    .rst_n, .tx_ser_clk, .tx_user_clk, .rx_ser_clk(tx_ser_clk), .rx_user_clk,
    .tx_clk_out, .rx_clk_out, .tx_iq_valid, .tx_i, .tx_q, .tx_iq_ready,
    .ser_tx, .ser_rx, .rx_iq_valid, .rx_i, .rx_q, .rx_crc_err, .rx_frame_err,
    .rx_aligned(), .rx_comma_det(), .rx_realign(), .rx_code_err(), .rx_disp_err(),
    .rx_cc_insert(), .rx_cc_remove(), .rx_buf_underflow(), .rx_buf_overflow(), .rx_buf_level(),
    .tx_fifo_error()
  );

  logic [15:0] line = '0;
  always @(posedge tx_ser_clk) line <= {line[14:0], ser_tx};
  assign ser_rx = line[15];

  realtime t_sent[$];
  logic [31:0] v_sent[$];
  realtime lat_min = 1.0e9, lat_max = 0.0, lat_sum = 0.0;
  int      n_rx = 0;

  always @(posedge rx_clk_out) begin
    if (rx_iq_valid) begin
      realtime lat;
      logic [31:0] v;
      if (t_sent.size() == 0) begin
        errors++;
      end else begin
        lat = $realtime - t_sent.pop_front();
        v = v_sent.pop_front();
        if ({rx_i, rx_q} !== v) errors++;
        if (lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
        lat_sum += lat;
        n_rx++;
      end
    end
    if (rx_crc_err || rx_frame_err) errors++;
  end

  initial begin
    done = 1'b0;
    errors = 0;
    @(posedge rst_n);
    repeat (80) @(posedge tx_clk_out);
    for (int n = 0; n < NFRAMES; n++) begin
      #0.1;
      tx_iq_valid = 1'b1;
      tx_i = 16'($urandom);
      tx_q = 16'($urandom);
      @(posedge tx_clk_out);
      while (!tx_iq_ready) @(posedge tx_clk_out);
      t_sent.push_back($realtime);
      v_sent.push_back({tx_i, tx_q});
      #0.1;
      tx_iq_valid = 1'b0;
      repeat (15) @(posedge tx_clk_out);
    end
    repeat (60) @(posedge tx_clk_out);
    if (n_rx != NFRAMES) errors++;
    done = 1'b1;
  end
endmodule
