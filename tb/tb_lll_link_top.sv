// End-to-end testbench of the low latency link at its default configuration
// (TX phase FIFO bypassed, RX elastic buffer on, CLK_COR_MIN_LAT = 4).
//
// The serial output is looped back to the input through a model of the line:
// a delay of CH_DELAY bit periods (about 5 ns of fibre) on the transmit bit
// clock, which also serves as the recovered receive bit clock (the clock and
// data recovery is analog and not modelled). The receive user clock runs from
// its own oscillator, first 0.3 % slower than the line and then 0.3 % faster,
// so the elastic buffer has to remove and then insert idle words.
//
// Random I/Q samples go in at random intervals; each must come out once, in
// order, unchanged, within the 200 ns a single link may take. Some frames get
// one bit flipped on the line; they must never be delivered and must raise a
// CRC or framing error. Once the line slips by one bit, and the receiver must
// find the comma again. The testbench counts how often each mechanism
// happened and fails on one that never did.
module tb_lll_link_top;
  import lll_pkg::*;

  localparam realtime TBIT     = 0.32;        // 3.125 Gb/s
  localparam realtime TWORD    = 20 * TBIT;   // 6.4 ns
  localparam int      CH_DELAY = 16;          // bits, about 5 ns
  localparam int      NFRAMES  = 400;

  logic        rst_n = 1'b1;
  logic        tx_ser_clk = 1'b0, rx_user_clk = 1'b0, tx_user_clk = 1'b0;
  logic        tx_clk_out, rx_clk_out;
  logic        tx_iq_valid = 1'b0, tx_iq_ready;
  logic [15:0] tx_i = '0, tx_q = '0;
  logic        ser_tx, ser_rx;
  logic        rx_iq_valid, rx_crc_err, rx_frame_err;
  logic [15:0] rx_i, rx_q;
  logic        rx_aligned, rx_comma_det, rx_realign;
  logic [1:0]  rx_code_err, rx_disp_err;
  logic        rx_cc_insert, rx_cc_remove, rx_buf_underflow, rx_buf_overflow;
  logic        tx_fifo_error;
  logic [5:0]  rx_buf_level;

  lll_link_top dut (
    .rst_n, .tx_ser_clk, .tx_user_clk, .rx_ser_clk(tx_ser_clk), .rx_user_clk,
    .tx_clk_out, .rx_clk_out, .tx_iq_valid, .tx_i, .tx_q, .tx_iq_ready,
    .ser_tx, .ser_rx, .rx_iq_valid, .rx_i, .rx_q, .rx_crc_err, .rx_frame_err,
    .rx_aligned, .rx_comma_det, .rx_realign, .rx_code_err, .rx_disp_err,
    .rx_cc_insert, .rx_cc_remove, .rx_buf_underflow, .rx_buf_overflow, .rx_buf_level,
    .tx_fifo_error
  );

  int checks = 0, failures = 0;

  // ---------------- clocks ----------------
  realtime rx_period = TWORD * 1.003;
  always #(TBIT / 2) tx_ser_clk = ~tx_ser_clk;
  always #(TWORD / 2) tx_user_clk = ~tx_user_clk;   // unused when the TX FIFO is bypassed
  always #(rx_period / 2) rx_user_clk = ~rx_user_clk;

  // ---------------- line model ----------------
  logic [63:0] line = '0;
  int          delay = CH_DELAY;
  logic        flip = 1'b0;
  always @(posedge tx_ser_clk) line <= {line[62:0], ser_tx ^ flip};
  assign ser_rx = line[delay-1];

  // ---------------- watchdog ----------------
  initial begin
    #400us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scoreboard ----------------
  typedef struct {
    logic [15:0] i, q;
    realtime     t;
    bit          corrupt;
  } item_t;
  item_t   sent[$];
  int      n_ok = 0, n_lost = 0, n_crc = 0, n_ferr = 0, n_ins = 0, n_rem = 0, n_realign = 0;
  realtime lat_min = 1.0e9, lat_max = 0.0;

  always @(posedge rx_clk_out) begin
    if (rx_cc_insert) n_ins++;
    if (rx_cc_remove) n_rem++;
    if (rx_crc_err) n_crc++;
    if (rx_frame_err) n_ferr++;
    if (rx_buf_underflow || rx_buf_overflow) begin
      failures++;
      $display("FAIL elastic buffer under/overflow at %t", $realtime);
    end
    if (rx_iq_valid) begin
      item_t e;
      checks++;
      while (sent.size() > 0 && sent[0].corrupt) begin
        void'(sent.pop_front());
        n_lost++;
      end
      if (sent.size() == 0) begin
        failures++;
        $display("FAIL unexpected frame %h %h", rx_i, rx_q);
      end else begin
        realtime lat;
        e = sent.pop_front();
        lat = $realtime - e.t;
        if (rx_i !== e.i || rx_q !== e.q) begin
          failures++;
          $display("FAIL got I=%h Q=%h expected I=%h Q=%h", rx_i, rx_q, e.i, e.q);
        end
        if (lat > 200.0) begin
          failures++;
          $display("FAIL latency %0.1f ns over the 200 ns link budget", lat);
        end
        if (lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
        n_ok++;
      end
    end
  end

  always @(posedge rx_realign) n_realign++;

  // ---------------- stimulus ----------------
  task automatic send_frame(input bit corrupt);
    item_t e;
    @(posedge tx_clk_out);
    while (!tx_iq_ready) @(posedge tx_clk_out);
    #0.1;
    tx_iq_valid = 1'b1;
    tx_i = 16'($urandom);
    tx_q = 16'($urandom);
    @(posedge tx_clk_out);
    e.i = tx_i; e.q = tx_q; e.t = $realtime; e.corrupt = corrupt;
    sent.push_back(e);
    #0.1;
    tx_iq_valid = 1'b0;
    if (corrupt) begin
      // The I word leaves the serializer two word clocks after acceptance;
      // flip one of the 60 frame bits, away from the edges.
      int b;
      b = $urandom_range(3, 56);
      fork
        begin
          #(2 * TWORD + b * TBIT - 0.1);
          flip = 1'b1;
          #(TBIT);
          flip = 1'b0;
        end
      join_none
    end
  endtask

  task automatic idle(input int words);
    repeat (words) @(posedge tx_clk_out);
  endtask

  initial begin
    // asynchronous reset: the word clocks are generated inside the link and
    // stop during reset, so reset needs its falling edge
    #1 rst_n = 1'b0;
    #(5 * TWORD);
    rst_n = 1'b1;
    // symbol alignment from the idle stream
    idle(60);
    checks++;
    if (!rx_aligned) begin
      failures++;
      $display("FAIL receiver not aligned after reset");
    end
    for (int n = 0; n < NFRAMES; n++) begin
      send_frame(n % 25 == 7);
      idle($urandom_range(1, 12));
      if (n == NFRAMES / 3) begin
        // line slips by one bit while idle; also the local clock moves fast
        idle(40);
        delay = CH_DELAY + 1;
        rx_period = TWORD * 0.997;
        idle(40);
      end
    end
    idle(200);
    checks++;
    if (sent.size() != 0) begin
      while (sent.size() > 0 && sent[0].corrupt) begin
        void'(sent.pop_front());
        n_lost++;
      end
      if (sent.size() != 0) begin
        failures++;
        $display("FAIL %0d frames never arrived", sent.size());
      end
    end
    checks++;
    if (n_crc + n_ferr < n_lost) begin
      failures++;
      $display("FAIL %0d corrupted frames but only %0d errors flagged", n_lost, n_crc + n_ferr);
    end
    $display("frames ok %0d, corrupted %0d, crc errors %0d, frame errors %0d", n_ok, n_lost, n_crc, n_ferr);
    $display("clock corrections: %0d insertions, %0d removals; realignments %0d", n_ins, n_rem, n_realign);
    $display("latency %0.1f .. %0.1f ns", lat_min, lat_max);
    // every mechanism must have happened
    checks++; if (n_ok == 0)     begin failures++; $display("FAIL no frame delivered"); end
    checks++; if (n_crc == 0)    begin failures++; $display("FAIL CRC check never triggered"); end
    checks++; if (n_ins == 0)    begin failures++; $display("FAIL no clock correction insertion"); end
    checks++; if (n_rem == 0)    begin failures++; $display("FAIL no clock correction removal"); end
    checks++; if (n_realign < 2) begin failures++; $display("FAIL comma realignment after the bit slip did not happen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
