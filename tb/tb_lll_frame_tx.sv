// Testbench for the frame transmitter.
//
// Offers samples at random times and follows every output word with a model
// of the frame format: idle words (K28.5 in symbol 0, K28.0 in symbol 1, both
// flagged as control) while nothing is sent, and for each accepted sample the
// words I, Q and CRC-16 (computed here byte-wise) as data, starting one clock
// after acceptance, followed by at least one idle word before the next frame.
module tb_lll_frame_tx;
  import lll_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        iq_valid = 1'b0, iq_ready;
  logic [15:0] i_data = '0, q_data = '0;
  pcs_word_t   tx_word;
  int          checks = 0, failures = 0;

  lll_frame_tx dut (.clk, .rst_n, .iq_valid, .i_data, .q_data, .iq_ready, .tx_word);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] crc_byte(input logic [15:0] c, input logic [7:0] b);
    logic [7:0] x;
    x = c[15:8] ^ b;
    x = x ^ (x >> 4);
    return (c << 8) ^ (16'(x) << 12) ^ (16'(x) << 5) ^ 16'(x);
  endfunction

  function automatic logic [15:0] crc_iq(input logic [15:0] i, input logic [15:0] q);
    logic [15:0] c = 16'hFFFF;
    c = crc_byte(c, i[15:8]);
    c = crc_byte(c, i[7:0]);
    c = crc_byte(c, q[15:8]);
    c = crc_byte(c, q[7:0]);
    return c;
  endfunction

  // Cycle model: a queue of words still owed; the transmitter is ready
  // exactly when nothing is owed. On acceptance the I word is due at the same
  // edge (registered output), then Q, CRC and one idle word.
  logic [17:0] owed[$];
  int          frames = 0;
  logic        ready_seen, valid_seen;
  logic [15:0] i_seen, q_seen;

  task automatic check_word(input logic [17:0] e);
    checks++;
    if ({tx_word.k, tx_word.data} !== e) begin
      failures++;
      $display("FAIL at %t: word %h k %b, expected %h k %b", $realtime, tx_word.data, tx_word.k, e[15:0], e[17:16]);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    repeat (4000) begin
      @(negedge clk);
      iq_valid = ($urandom_range(0, 2) == 0);
      i_data   = 16'($urandom);
      q_data   = 16'($urandom);
      #1;
      ready_seen = iq_ready;
      valid_seen = iq_valid;
      i_seen     = i_data;
      q_seen     = q_data;
      checks++;
      if (ready_seen !== (owed.size() == 0)) begin
        failures++;
        $display("FAIL at %t: iq_ready %b with %0d words owed", $realtime, ready_seen, owed.size());
      end
      @(posedge clk);
      #1;
      if (valid_seen && owed.size() == 0) begin
        check_word({2'b00, i_seen});
        owed.push_back({2'b00, q_seen});
        owed.push_back({2'b00, crc_iq(i_seen, q_seen)});
        owed.push_back({2'b11, K28_0, K28_5});
        frames++;
      end else if (owed.size() > 0) begin
        check_word(owed.pop_front());
      end else begin
        check_word({2'b11, K28_0, K28_5});
      end
    end
    checks++;
    if (frames < 500) begin
      failures++;
      $display("FAIL only %0d frames sent", frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
