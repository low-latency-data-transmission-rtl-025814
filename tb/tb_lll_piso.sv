// Testbench for the serializer.
//
// Runs the bit clock at 3.125 GHz (0.32 ns), drives a new random 20-bit word
// at every rising edge of the generated word clock and collects the serial
// output. Every 20 consecutive bits after a load must be one word, bit 0 first,
// and the word clock must have a period of exactly 20 bit clocks (6.4 ns).
module tb_lll_piso;
  logic        ser_clk = 1'b0, rst_n = 1'b1;
  logic [19:0] par_in = '0;
  logic        ser_out, word_clk;
  int          checks = 0, failures = 0;

  lll_piso dut (.ser_clk, .rst_n, .par_in, .ser_out, .word_clk);

  always #0.16 ser_clk = ~ser_clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [19:0] q[$];
  realtime     t_last = 0.0;
  int          nwc = 0;

  // new word after each word clock edge; the serializer loads it at the end
  // of the word now being sent
  always @(posedge word_clk) begin
    if (nwc > 1) begin
      checks++;
      if ($realtime - t_last < 6.39 || $realtime - t_last > 6.41) begin
        failures++;
        $display("FAIL word clock period %0.3f ns", $realtime - t_last);
      end
    end
    t_last = $realtime;
    nwc++;
    #0.05;
    par_in = 20'($urandom);
    q.push_back(par_in);
  end

  // collect bits: sample the output in the middle of each bit
  logic [19:0] got;
  int          nb = 0;
  int          nwords = 0;
  initial begin
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    // align to the first word that was driven: it starts at the word clock
    // edge after the one that produced it
    @(posedge word_clk);
    @(posedge word_clk);
    #0.01;
    repeat (300) begin
      for (int b = 0; b < 20; b++) begin
        got[b] = ser_out;
        @(posedge ser_clk);
        #0.01;
      end
      checks++;
      if (q.size() == 0 || got !== q[0]) begin
        failures++;
        $display("FAIL serial word %b expected %b", got, (q.size() > 0) ? q[0] : 20'h0);
      end
      if (q.size() > 0) void'(q.pop_front());
      nwords++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
