// Latency of the link in the buffer configurations of the latency study.
//
// Five links run side by side at 3.125 Gb/s with a 5 ns loopback line:
//   case 2: TX phase FIFO and RX elastic buffer, CLK_COR_MIN_LAT 16 and 4
//   case 3: TX phase FIFO bypassed, RX elastic buffer, CLK_COR_MIN_LAT 16 and 4
//   case 4: both bypassed
// The receive user clock has the line's frequency and its own phase. The
// checks are on differences, which do not depend on the analog parts left
// out: 12 symbols less of CLK_COR_MIN_LAT must save 12 symbol times (38.4 ns,
// the 147 -> 109 ns and 141 -> 103 ns steps of the measurements) within one
// word time; bypassing the TX FIFO and then the RX buffer must each save
// latency; and every configuration must stay inside the 200 ns link budget.
module tb_lll_link_latency;
  localparam realtime TBIT  = 0.32;
  localparam realtime TWORD = 20 * TBIT;

  logic tx_ser_clk = 1'b0, tx_user_clk = 1'b0, rx_user_clk = 1'b0, rst_n = 1'b1;
  logic [4:0] done;
  int         err [5];
  int         checks = 0, failures = 0;

  always #(TBIT / 2) tx_ser_clk = ~tx_ser_clk;
  initial begin
    #1.3;
    forever #(TWORD / 2) tx_user_clk = ~tx_user_clk;
  end
  initial begin
    #2.9;
    forever #(TWORD / 2) rx_user_clk = ~rx_user_clk;
  end

  lll_lat_probe #(.TX_BUF_EN(1), .RX_BUF_EN(1), .CLK_COR_MIN_LAT(16)) c2_16 (.tx_ser_clk, .tx_user_clk, .rx_user_clk, .rst_n, .done(done[0]), .errors(err[0]));
  lll_lat_probe #(.TX_BUF_EN(0), .RX_BUF_EN(1), .CLK_COR_MIN_LAT(16)) c3_16 (.tx_ser_clk, .tx_user_clk, .rx_user_clk, .rst_n, .done(done[1]), .errors(err[1]));
  lll_lat_probe #(.TX_BUF_EN(1), .RX_BUF_EN(1), .CLK_COR_MIN_LAT(4))  c2_4  (.tx_ser_clk, .tx_user_clk, .rx_user_clk, .rst_n, .done(done[2]), .errors(err[2]));
  lll_lat_probe #(.TX_BUF_EN(0), .RX_BUF_EN(1), .CLK_COR_MIN_LAT(4))  c3_4  (.tx_ser_clk, .tx_user_clk, .rx_user_clk, .rst_n, .done(done[3]), .errors(err[3]));
  lll_lat_probe #(.TX_BUF_EN(0), .RX_BUF_EN(0), .CLK_COR_MIN_LAT(4))  c4    (.tx_ser_clk, .tx_user_clk, .rx_user_clk, .rst_n, .done(done[4]), .errors(err[4]));

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    realtime m[5];
    #1 rst_n = 1'b0;
    #(5 * TWORD) rst_n = 1'b1;
    wait (&done);
    m[0] = c2_16.lat_sum / c2_16.n_rx;
    m[1] = c3_16.lat_sum / c3_16.n_rx;
    m[2] = c2_4.lat_sum / c2_4.n_rx;
    m[3] = c3_4.lat_sum / c3_4.n_rx;
    m[4] = c4.lat_sum / c4.n_rx;
    $display("case 2, MIN_LAT 16: %6.1f ns  (min %0.1f max %0.1f)", m[0], c2_16.lat_min, c2_16.lat_max);
    $display("case 3, MIN_LAT 16: %6.1f ns  (min %0.1f max %0.1f)", m[1], c3_16.lat_min, c3_16.lat_max);
    $display("case 2, MIN_LAT 4:  %6.1f ns  (min %0.1f max %0.1f)", m[2], c2_4.lat_min, c2_4.lat_max);
    $display("case 3, MIN_LAT 4:  %6.1f ns  (min %0.1f max %0.1f)", m[3], c3_4.lat_min, c3_4.lat_max);
    $display("case 4:             %6.1f ns  (min %0.1f max %0.1f)", m[4], c4.lat_min, c4.lat_max);
    for (int k = 0; k < 5; k++) begin
      expect_true(err[k] == 0, $sformatf("configuration %0d lost or corrupted frames (%0d)", k, err[k]));
      expect_true(m[k] < 200.0, $sformatf("configuration %0d over the 200 ns link budget", k));
    end
    expect_true(m[0] - m[2] > 38.4 - TWORD && m[0] - m[2] < 38.4 + TWORD, "MIN_LAT 16 -> 4 with TX FIFO does not save 12 symbols");
    expect_true(m[1] - m[3] > 38.4 - TWORD && m[1] - m[3] < 38.4 + TWORD, "MIN_LAT 16 -> 4 without TX FIFO does not save 12 symbols");
    expect_true(m[0] > m[1] && m[2] > m[3], "bypassing the TX FIFO does not reduce latency");
    expect_true(m[4] < m[3], "bypassing the RX elastic buffer does not reduce latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
