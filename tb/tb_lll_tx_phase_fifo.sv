// Testbench for the transmit phase adjust FIFO.
//
// Write and read clocks have the same 6.4 ns period and a random phase
// offset, as the FPGA transmit clock and the transceiver clock have. A counter
// is written every write clock. The read side must first give the encoded
// idle word, then the counter values in order with no gap or repeat, never
// raise its error flag, and have a latency (write edge to read edge) that
// stays the same for the whole run and is at most three word periods.
module tb_lll_tx_phase_fifo;
  logic        wr_clk = 1'b0, rd_clk = 1'b0, rst_n = 1'b1;
  logic [19:0] din = '0, dout;
  logic        error;
  int          checks = 0, failures = 0;

  lll_tx_phase_fifo dut (.wr_clk, .rd_clk, .rst_n, .din, .dout, .error);

  localparam realtime T = 6.4;
  realtime phase;

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime wtime [int];
  always @(posedge wr_clk) begin
    if (rst_n) begin
      #0.05;
      din = din + 1'b1;
      wtime[int'(din)] = $realtime;
    end
  end

  int      last = -1;
  int      nread = 0;
  realtime lat0 = -1.0;
  always @(posedge rd_clk) begin
    #0.05;
    if (rst_n) begin
      if (error) begin
        failures++;
        $display("FAIL error flag");
      end
      if (last < 0 && dout == {10'b1101000011, 10'b0101111100}) begin
        // still the idle word before start
      end else begin
        checks++;
        if (last >= 0 && int'(dout) != last + 1) begin
          failures++;
          $display("FAIL read %0d after %0d", dout, last);
        end
        if (wtime.exists(int'(dout))) begin
          realtime lat;
          lat = $realtime - wtime[int'(dout)];
          if (lat0 < 0) lat0 = lat;
          checks++;
          if (lat > lat0 + 0.01 || lat < lat0 - 0.01 || lat > 3 * T) begin
            failures++;
            $display("FAIL latency %0.2f ns (first %0.2f)", lat, lat0);
          end
        end
        last = int'(dout);
        nread++;
      end
    end
  end

  initial begin
    for (int run = 0; run < 4; run++) begin
      phase = $urandom_range(1, 63) * 0.1;
      fork
        begin : wclk
          forever #(T / 2) wr_clk = ~wr_clk;
        end
        begin : rclk
          #(phase);
          forever #(T / 2) rd_clk = ~rd_clk;
        end
        begin
          #1 rst_n = 1'b0;
          last = -1;
          lat0 = -1.0;
          din = '0;
          wtime.delete();
          #20 rst_n = 1'b1;
          #(500 * T);
        end
      join_any
      disable wclk;
      disable rclk;
      checks++;
      if (nread < 400) begin
        failures++;
        $display("FAIL only %0d words read", nread);
      end
      $display("phase %0.1f ns: latency %0.2f ns", phase, lat0);
      nread = 0;
      rst_n = 1'b1;
      wr_clk = 1'b0;
      rd_clk = 1'b0;
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
