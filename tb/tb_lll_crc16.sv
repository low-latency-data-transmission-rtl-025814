// Testbench for the frame CRC-16.
//
// The reference is the byte-wise CRC-16/CCITT routine (x = crc>>8 ^ byte;
// x ^= x>>4; crc = crc<<8 ^ x<<12 ^ x<<5 ^ x), a different algorithm from the
// bit-serial loop in the RTL. The reference itself is checked first against
// the published check value 0x29B1 of "123456789". Then I and Q go in as four
// bytes, most significant first, for corner values and random samples.
module tb_lll_crc16;
  logic [15:0] i_word, q_word, crc;
  int checks = 0, failures = 0;

  lll_crc16 dut (.i_word, .q_word, .crc);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_byte(input logic [15:0] c, input logic [7:0] b);
    logic [7:0] x;
    x = c[15:8] ^ b;
    x = x ^ (x >> 4);
    return (c << 8) ^ (16'(x) << 12) ^ (16'(x) << 5) ^ 16'(x);
  endfunction

  function automatic logic [15:0] ref_iq(input logic [15:0] i, input logic [15:0] q);
    logic [15:0] c = 16'hFFFF;
    c = ref_byte(c, i[15:8]);
    c = ref_byte(c, i[7:0]);
    c = ref_byte(c, q[15:8]);
    c = ref_byte(c, q[7:0]);
    return c;
  endfunction

  task automatic try(input logic [15:0] i, input logic [15:0] q);
    i_word = i;
    q_word = q;
    #1;
    checks++;
    if (crc !== ref_iq(i, q)) begin
      failures++;
      $display("FAIL I=%h Q=%h crc %h expected %h", i, q, crc, ref_iq(i, q));
    end
  endtask

  initial begin
    logic [15:0] c;
    string s = "123456789";
    c = 16'hFFFF;
    for (int k = 0; k < 9; k++) c = ref_byte(c, s[k]);
    checks++;
    if (c != 16'h29B1) begin
      failures++;
      $display("FAIL reference CRC of 123456789 is %h", c);
    end
    try(16'h0000, 16'h0000);
    try(16'hFFFF, 16'hFFFF);
    try(16'h8000, 16'h0001);
    try(16'h1234, 16'h5678);
    for (int n = 0; n < 2000; n++) try(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
