// Testbench for the frame receiver.
//
// Feeds word streams straight into the receiver: idle words, good frames,
// frames with a wrong CRC, frames cut short by a control word or by a word
// flagged as a decoding error, and data words that do not follow a control
// word (which must not start a frame). The CRC is computed here byte-wise.
// A good frame must give iq_valid with its I and Q at the same clock edge that
// takes in its CRC word (registered outputs).
module tb_lll_frame_rx;
  import lll_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  pcs_word_t   rx_word = '{k: 2'b00, data: 16'h0000};
  logic        rx_err = 1'b0;
  logic        iq_valid, crc_err, frame_err;
  logic [15:0] i_data, q_data;
  int          checks = 0, failures = 0;
  int          n_valid = 0, n_crc = 0, n_ferr = 0;

  lll_frame_rx dut (.clk, .rst_n, .rx_word, .rx_err, .iq_valid, .i_data, .q_data, .crc_err, .frame_err);

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

  // expected pulses appear with the clock edge that takes in the word that
  // completes them
  typedef enum {E_NONE, E_VALID, E_CRC, E_FERR} ev_t;
  ev_t         exp_ev = E_NONE;
  logic [15:0] exp_i, exp_q;

  task automatic put(input pcs_word_t w, input logic err, input ev_t ev,
                     input logic [15:0] ei = '0, input logic [15:0] eq = '0);
    @(negedge clk);
    rx_word = w;
    rx_err  = err;
    exp_ev = ev;
    exp_i  = ei;
    exp_q  = eq;
    @(posedge clk);
    #1;
    checks++;
    if ((exp_ev == E_VALID) !== iq_valid || (exp_ev == E_CRC) !== crc_err || (exp_ev == E_FERR) !== frame_err) begin
      failures++;
      $display("FAIL at %t: valid %b crc_err %b frame_err %b, expected event %s",
               $realtime, iq_valid, crc_err, frame_err, exp_ev.name());
    end
    if (exp_ev == E_VALID) begin
      checks++;
      if (i_data !== exp_i || q_data !== exp_q) begin
        failures++;
        $display("FAIL data %h %h expected %h %h", i_data, q_data, exp_i, exp_q);
      end
    end
    if (iq_valid) n_valid++;
    if (crc_err) n_crc++;
    if (frame_err) n_ferr++;
  endtask

  function automatic pcs_word_t dw(input logic [15:0] d);
    return '{k: 2'b00, data: d};
  endfunction

  initial begin
    logic [15:0] i, q;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    // data before any control word: ignored
    put(dw(16'h1111), 0, E_NONE);
    put(dw(16'h2222), 0, E_NONE);
    put(dw(16'h3333), 0, E_NONE);
    put(IDLE_WORD, 0, E_NONE);
    for (int n = 0; n < 600; n++) begin
      int kind;
      kind = $urandom_range(0, 5);
      i = 16'($urandom);
      q = 16'($urandom);
      repeat ($urandom_range(1, 3)) put(IDLE_WORD, 0, E_NONE);
      put(dw(i), 0, E_NONE);
      case (kind)
        0: begin  // wrong CRC
          put(dw(q), 0, E_NONE);
          put(dw(crc_iq(i, q) ^ 16'(1 << $urandom_range(0, 15))), 0, E_CRC);
        end
        1: begin  // control word instead of Q
          put(IDLE_WORD, 0, E_FERR);
        end
        2: begin  // decoding error on the CRC word
          put(dw(q), 0, E_NONE);
          put(dw(crc_iq(i, q)), 1, E_FERR);
        end
        3: begin  // good frame followed by trailing data that must be ignored
          put(dw(q), 0, E_NONE);
          put(dw(crc_iq(i, q)), 0, E_VALID, i, q);
          put(dw(16'hABCD), 0, E_NONE);
          put(dw(16'h0123), 0, E_NONE);
          put(dw(16'h4567), 0, E_NONE);
          put(dw(16'h89AB), 0, E_NONE);
        end
        default: begin
          put(dw(q), 0, E_NONE);
          put(dw(crc_iq(i, q)), 0, E_VALID, i, q);
        end
      endcase
    end
    put(IDLE_WORD, 0, E_NONE);
    put(IDLE_WORD, 0, E_NONE);
    checks++;
    if (n_valid == 0 || n_crc == 0 || n_ferr == 0) begin
      failures++;
      $display("FAIL event counts valid %0d crc %0d frame %0d", n_valid, n_crc, n_ferr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
