// Testbench for the deserializer.
//
// Sends a random bit stream at 3.125 Gb/s and reads the parallel words at each
// rising edge of the recovered word clock. The first full word fixes where the
// word boundary fell in the stream; every later word must be the next 20 bits,
// first received bit in bit 0, and the word clock period must be 6.4 ns.
module tb_lll_sipo;
  logic        ser_clk = 1'b0, rst_n = 1'b1;
  logic        ser_in = 1'b0;
  logic [19:0] par_out;
  logic        word_clk;
  int          checks = 0, failures = 0;

  lll_sipo dut (.ser_clk, .rst_n, .ser_in, .par_out, .word_clk);

  always #0.16 ser_clk = ~ser_clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic stream[$];
  always @(negedge ser_clk) begin
    ser_in = 1'($urandom);
    stream.push_back(ser_in);
  end

  int      base = -1;
  int      nw = 0;
  realtime t_last = 0.0;

  always @(posedge word_clk) begin
    #0.01;
    // the first word clock edge comes right after reset, before a full word
    if (nw > 1) begin
      checks++;
      if ($realtime - t_last < 6.39 || $realtime - t_last > 6.41) begin
        failures++;
        $display("FAIL word clock period %0.3f ns", $realtime - t_last);
      end
    end
    t_last = $realtime;
    if (nw == 0) begin
      // nothing to check yet
    end else if (base < 0) begin
      // find where this word sits in the stream
      for (int s = 0; s + 20 <= stream.size(); s++) begin
        logic [19:0] w;
        for (int b = 0; b < 20; b++) w[b] = stream[s+b];
        if (w == par_out) base = s;
      end
      checks++;
      if (base < 0) begin
        failures++;
        $display("FAIL first word %b not in the stream", par_out);
      end
    end else begin
      logic [19:0] e;
      base += 20;
      for (int b = 0; b < 20; b++) e[b] = stream[base+b];
      checks++;
      if (par_out !== e) begin
        failures++;
        $display("FAIL word %0d: %b expected %b", nw, par_out, e);
      end
    end
    nw++;
  end

  initial begin
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    #(300 * 6.4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
