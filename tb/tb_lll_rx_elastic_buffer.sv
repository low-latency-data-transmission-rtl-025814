// Testbench for the receive elastic buffer.
//
// The write side gets a stream like the one on the line: idle words and
// numbered data words (control flags clear), one per 6.4 ns write clock. The
// read clock runs first 0.5 % slower and then 0.5 % faster than the write
// clock. With the idle words left out, the read stream must be exactly the
// written data words in order: clock correction may only add or drop idle
// words. Each cc_insert must come with an idle word on the output and each
// cc_remove must drop one; both must happen. Once data flows, the fill the
// read side sees must stay within CLK_COR_MIN_LAT and CLK_COR_MAX_LAT apart
// from the one word a correction may take. No underflow or overflow is allowed.
module tb_lll_rx_elastic_buffer;
  import lll_pkg::*;

  localparam int MIN_LAT = 4;
  localparam int MAX_LAT = MIN_LAT + 4;

  logic      wr_clk = 1'b0, rd_clk = 1'b0, rst_n = 1'b1;
  pcs_word_t din = IDLE_WORD, dout;
  logic      din_valid = 1'b0;
  logic      cc_insert, cc_remove, underflow, overflow;
  logic [5:0] level;
  int        checks = 0, failures = 0;

  lll_rx_elastic_buffer dut (
    .wr_clk, .rd_clk, .rst_n, .din, .din_valid, .dout,
    .cc_insert, .cc_remove, .underflow, .overflow, .level
  );

  localparam realtime T = 6.4;
  realtime rd_period = T * 1.005;

  always #(T / 2) wr_clk = ~wr_clk;
  always #(rd_period / 2) rd_clk = ~rd_clk;

  initial begin
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write stream: groups of data words separated by idle words
  int unsigned next_data = 0;
  int          run_left = 0;
  always @(posedge wr_clk) begin
    #0.1;
    if (rst_n && din_valid) begin
      if (run_left > 0) begin
        din = '{k: 2'b00, data: 16'(next_data)};
        next_data++;
        run_left--;
      end else begin
        din = IDLE_WORD;
        if ($urandom_range(0, 2) == 0) run_left = $urandom_range(1, 6);
      end
    end
  end

  int unsigned exp_data = 0;
  int          n_ins = 0, n_rem = 0, n_data = 0, n_idle_out = 0;
  bit          started = 0;
  always @(posedge rd_clk) begin
    #0.1;
    if (rst_n) begin
      if (underflow || overflow) begin
        failures++;
        $display("FAIL underflow %b overflow %b at %t", underflow, overflow, $realtime);
      end
      if (cc_insert) begin
        n_ins++;
        checks++;
        if (dout !== IDLE_WORD) begin
          failures++;
          $display("FAIL insertion without idle word");
        end
      end
      if (cc_remove) n_rem++;
      if (dout.k == 2'b00) begin
        checks++;
        if (!started) begin
          started = 1;
        end
        if (dout.data !== 16'(exp_data)) begin
          failures++;
          $display("FAIL data %0d expected %0d at %t", dout.data, exp_data, $realtime);
          exp_data = int'(dout.data);
        end
        exp_data++;
        n_data++;
      end else if (dout !== IDLE_WORD) begin
        failures++;
        $display("FAIL unexpected word %h k %b", dout.data, dout.k);
      end
      if (started && n_data > 20) begin
        checks++;
        if (32'(level) * 2 + 2 < MIN_LAT || 32'(level) * 2 > MAX_LAT + 2) begin
          failures++;
          $display("FAIL fill %0d words outside the clock correction window", level);
        end
      end
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    repeat (3) @(posedge wr_clk);
    #0.1 din_valid = 1'b1;
    #(5000 * T);
    rd_period = T * 0.995;
    #(5000 * T);
    $display("words %0d, insertions %0d, removals %0d", n_data, n_ins, n_rem);
    checks++;
    if (n_ins == 0 || n_rem == 0 || n_data < 1000) begin
      failures++;
      $display("FAIL clock correction not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
