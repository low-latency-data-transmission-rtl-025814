// Testbench for comma detection and alignment.
//
// Builds a bit stream of 20-bit words (10-bit symbols, bit 0 first): idle words
// made of the comma K28.5 (0101111100 at negative disparity, or its
// complement) and K28.0, and data words made of D21.5 and D10.2, which cannot
// form a comma; in every second run all commas are in their positive form.
// The stream is cut into 20-bit raw words at a random bit offset
// and fed to the aligner. After the first comma the aligned output must equal
// the transmitted words, one clock after the raw word that completes each. Then the offset changes by a few
// bits: the aligner must report a realignment and lock again.
module tb_lll_comma_align;
  import lll_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic [19:0] raw = '0, aligned_word;
  logic        aligned, comma_det, realign;
  int          checks = 0, failures = 0;

  lll_comma_align dut (.clk, .rst_n, .raw, .aligned_word, .aligned, .comma_det, .realign);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [9:0] K285N = 10'b0101111100;   // bit 9 .. bit 0
  localparam logic [9:0] K280P = 10'b1101000011;
  localparam logic [9:0] D215  = 10'b1010101010;
  localparam logic [9:0] D102  = 10'b0101010101;

  logic [19:0] words[$];     // transmitted words, in order
  logic        bits[$];      // line bits, in order
  int          n_realign = 0;

  bit only_pos = 0;   // send every comma in its positive-disparity form

  function automatic logic [19:0] make_word(input int n);
    if (n % 4 == 0 || n % 7 == 3) return {K280P, (only_pos || n % 2 != 0) ? ~K285N : K285N};
    return {($urandom_range(0, 1) != 0) ? D215 : D102, ($urandom_range(0, 1) != 0) ? D215 : D102};
  endfunction

  // run the aligner over the stream cut at bit offset off; returns checks done
  task automatic run(input int off, input int nwords, input bit expect_realign);
    logic [19:0] hist[$];
    int          realigns = 0;
    int          first_ok = -1;
    words.delete();
    bits.delete();
    for (int n = 0; n < nwords + 4; n++) begin
      logic [19:0] w;
      w = make_word(n);
      words.push_back(w);
      for (int b = 0; b < 20; b++) bits.push_back(w[b]);
    end
    for (int n = 0; n + 1 < nwords; n++) begin
      logic [19:0] r;
      for (int b = 0; b < 20; b++) r[b] = bits[off + 20 * n + b];
      @(negedge clk);
      raw = r;
      @(posedge clk);
      #1;
      if (realign) realigns++;
      // raw word n completes transmitted word n (the offset is 1..19 bits), so
      // once the aligner has seen the comma of word 3 it shows word n after
      // this edge
      if (aligned && n >= 4) begin
        checks++;
        if (aligned_word !== words[n]) begin
          failures++;
          $display("FAIL offset %0d word %0d: got %b expected %b", off, n, aligned_word, words[n]);
        end
      end
    end
    checks++;
    if (!aligned) begin
      failures++;
      $display("FAIL never aligned at offset %0d", off);
    end
    if (expect_realign) begin
      checks++;
      if (realigns == 0) begin
        failures++;
        $display("FAIL no realignment at offset %0d", off);
      end
    end
    n_realign += realigns;
  endtask

  initial begin
    int off;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int k = 0; k < 12; k++) begin
      off = $urandom_range(1, 19);
      only_pos = (k % 2 == 1);
      run(off, 100, k == 0 || k == 1);
    end
    $display("realignments %0d", n_realign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
