// Testbench for the 8B/10B decoder.
//
// Decodes hand-written code words from the standard tables (abcdei fghj,
// independent of the RTL tables), including the comma 0101111100, then every
// data byte and all twelve control characters at both running disparities as
// produced by the encoder, which must come back unchanged and without error
// flags. Finally it sends code words outside the code (code_err) and a
// correct code at the wrong running disparity (disp_err).
module tb_lll_dec8b10b;
  import lll_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  pcs_word_t   enc_in;
  logic [19:0] enc_code, code;
  logic        use_enc = 1'b1;
  logic [19:0] direct = '0;
  pcs_word_t   dout;
  logic [1:0]  code_err, disp_err;
  int          checks = 0, failures = 0;

  lll_enc8b10b u_enc (.clk, .rst_n, .din(enc_in), .code(enc_code));
  assign code = use_enc ? enc_code : direct;
  lll_dec8b10b dut (.clk, .rst_n, .code, .dout, .code_err, .disp_err);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] s2c(input logic [9:0] s);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[i] = s[9-i];
    return r;
  endfunction

  // Apply a raw 20-bit word and check the decoder's answer one clock later.
  task automatic raw(input logic [9:0] s0, input logic [9:0] s1, input logic [17:0] exp_w,
                     input logic [1:0] exp_cerr, input logic [1:0] exp_derr, input string what);
    @(negedge clk);
    use_enc = 1'b0;
    direct = {s2c(s1), s2c(s0)};
    @(posedge clk);
    #1;
    checks++;
    if (exp_cerr == 2'b00 && {dout.k, dout.data} !== exp_w) begin
      failures++;
      $display("FAIL %s: got %h k %b expected %h k %b", what, dout.data, dout.k, exp_w[15:0], exp_w[17:16]);
    end
    checks++;
    if (code_err !== exp_cerr || (exp_cerr == 2'b00 && disp_err !== exp_derr)) begin
      failures++;
      $display("FAIL %s: code_err %b disp_err %b expected %b %b", what, code_err, disp_err, exp_cerr, exp_derr);
    end
  endtask

  logic [7:0] kset [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                            8'hF7, 8'hFB, 8'hFD, 8'hFE};
  pcs_word_t sent[$];

  initial begin
    enc_in = IDLE_WORD;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    // K28.5 RD- then D21.5; then D0.0 RD+ and K28.0 RD+ (decoder RD follows)
    raw(10'b0011111010, 10'b1010101010, {2'b01, 8'hB5, 8'hBC}, 2'b00, 2'b00, "K28.5- D21.5");
    raw(10'b0110001011, 10'b1100001011, {2'b10, 8'h1C, 8'h00}, 2'b00, 2'b00, "D0.0+ K28.0+");
    raw(10'b1100000101, 10'b0101010101, {2'b01, 8'h4A, 8'hBC}, 2'b00, 2'b00, "K28.5+ D10.2");
    raw(10'b1000110111, 10'b1100010100, {2'b00, 8'h03, 8'hF1}, 2'b00, 2'b00, "D17.7 D3.0");
    // outside the code: all zeros, all ones
    raw(10'b0000000000, 10'b1111111111, '0, 2'b11, 2'b00, "invalid codes");
    // resynchronise RD to - with K28.5+ ... then K28.5- twice: second is a disparity error
    raw(10'b1100000101, 10'b0101010101, {2'b01, 8'h4A, 8'hBC}, 2'b00, 2'b00, "K28.5+ resync");
    raw(10'b0011111010, 10'b0011111010, {2'b11, 8'hBC, 8'hBC}, 2'b00, 2'b10, "K28.5- twice");

    // all data bytes and control characters through the encoder, both RDs
    @(negedge clk);
    rst_n = 1'b0;
    use_enc = 1'b1;
    #20 rst_n = 1'b1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int b = 0; b < 256 + 12; b++) begin
        pcs_word_t w;
        if (b < 256) w = '{k: 2'b00, data: {8'($urandom), 8'(b)}};
        else         w = '{k: 2'b01, data: {8'($urandom), kset[b-256]}};
        if (pass == 2) begin
          w.k[1] = 1'b1;
          w.data[15:8] = kset[$urandom_range(0, 11)];
        end
        @(negedge clk);
        enc_in = w;
        sent.push_back(w);
        @(posedge clk);
        #1;
        if (sent.size() == 2) begin
          pcs_word_t e;
          e = sent.pop_front();
          checks++;
          if (dout !== e || code_err != 2'b00 || disp_err != 2'b00) begin
            failures++;
            $display("FAIL roundtrip %h k %b -> %h k %b err %b %b", e.data, e.k, dout.data, dout.k, code_err, disp_err);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
