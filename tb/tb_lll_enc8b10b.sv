// Testbench for the 8B/10B encoder.
//
// Checks hand-written code words from the standard tables (written here as
// abcdei fghj strings, independent of the RTL tables), then streams random
// data and control words and checks the line-code rules with a disparity
// tracker of its own: each symbol has 4, 5 or 6 ones, a +2 symbol only at
// negative running disparity and a -2 symbol only at positive, runs of equal
// bits no longer than 5, and no two different bytes giving the same code.
module tb_lll_enc8b10b;
  import lll_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  pcs_word_t   din;
  logic [19:0] code;
  int          checks = 0, failures = 0;

  lll_enc8b10b dut (.clk, .rst_n, .din, .code);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // abcdeifghj written left to right -> a in bit 0
  function automatic logic [9:0] s2c(input logic [9:0] s);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[i] = s[9-i];
    return r;
  endfunction

  task automatic chk(input logic [9:0] got, input logic [9:0] exp_s, input string what);
    checks++;
    if (got !== s2c(exp_s)) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, s2c(exp_s));
    end
  endtask

  function automatic int ones10(input logic [9:0] v);
    int n = 0;
    for (int i = 0; i < 10; i++) n += int'(v[i]);
    return n;
  endfunction

  int         rd;       // -1 or +1
  int         run_len;
  logic       last_bit;
  logic [9:0] map_rdn [int];   // code -> byte (with k in bit 8)
  logic [7:0] kset [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                            8'hF7, 8'hFB, 8'hFD, 8'hFE};

  task automatic check_sym(input logic [9:0] c, input logic [8:0] kb);
    int n;
    n = ones10(c);
    checks++;
    if (n == 6 && rd == -1) rd = 1;
    else if (n == 4 && rd == 1) rd = -1;
    else if (n != 5) begin
      failures++;
      $display("FAIL disparity: code %b ones %0d rd %0d byte %h", c, n, rd, kb);
    end
    for (int i = 0; i < 10; i++) begin
      if (c[i] == last_bit) run_len++;
      else run_len = 1;
      last_bit = c[i];
    end
    if (run_len > 5) begin
      failures++;
      $display("FAIL run length %0d at code %b", run_len, c);
    end
    // injectivity: one code, one byte
    if (map_rdn.exists(int'(c))) begin
      if (map_rdn[int'(c)] != {1'b0, kb}) begin
        failures++;
        $display("FAIL code %b used for %h and %h", c, map_rdn[int'(c)], kb);
      end
    end else map_rdn[int'(c)] = {1'b0, kb};
  endtask

  task automatic send(input pcs_word_t w);
    din = w;
    @(posedge clk);
    #1;
  endtask

  initial begin
    din = IDLE_WORD;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    // K28.5 at RD- then D21.5 (balanced), RD is + afterwards
    send('{k: 2'b01, data: {8'hB5, 8'hBC}});
    chk(code[9:0],   10'b0011111010, "K28.5 RD-");
    chk(code[19:10], 10'b1010101010, "D21.5");
    // D0.0 at RD+ then K28.0 at RD+
    send('{k: 2'b10, data: {8'h1C, 8'h00}});
    chk(code[9:0],   10'b0110001011, "D0.0 RD+");
    chk(code[19:10], 10'b1100001011, "K28.0 RD+");
    // RD now +: K28.5 at RD+, then D10.2
    send('{k: 2'b01, data: {8'h4A, 8'hBC}});
    chk(code[9:0],   10'b1100000101, "K28.5 RD+");
    chk(code[19:10], 10'b0101010101, "D10.2");
    // RD now -: D17.7 uses the alternate A7 form at RD-; D3.0 balanced 6b
    send('{k: 2'b00, data: {8'h03, 8'hF1}});
    chk(code[9:0],   10'b1000110111, "D17.7 RD- (A7)");
    chk(code[19:10], 10'b1100010100, "D3.0 RD+");
    // The comma of the frame format: K28.5 at RD- must read 0101111100 with j first
    send('{k: 2'b11, data: {K28_0, K28_5}});
    // RD is - after D3.0 at RD+ (110001 balanced, 0100 is -2)
    chk(code[9:0], 10'b0011111010, "K28.5 after D3.0");

    // Random stream with property checks; tracker starts from RD- after reset.
    rst_n = 1'b0;
    #20;
    rst_n = 1'b1;
    #1;
    rd = -1;
    run_len = 0;
    last_bit = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      pcs_word_t w;
      for (int s = 0; s < 2; s++) begin
        if ($urandom_range(0, 5) == 0) begin
          w.k[s] = 1'b1;
          w.data[8*s +: 8] = kset[$urandom_range(0, 11)];
        end else begin
          w.k[s] = 1'b0;
          w.data[8*s +: 8] = 8'($urandom);
        end
      end
      send(w);
      check_sym(code[9:0],   {w.k[0], w.data[7:0]});
      check_sym(code[19:10], {w.k[1], w.data[15:8]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
