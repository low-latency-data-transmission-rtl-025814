// End-to-end testbench of the LLRF link network (lll_llrf_system, default
// parameters: 4 DAQ boards at the concentrator, 4 at the processing unit).
//
// Every module gets its own bit clock, 3.125 Gb/s with its own offset of up
// to +-0.2 %, so every elastic buffer has to insert or remove idle words.
// Each serial line is a shift register on the sending bit clock (the clock
// and data recovery is not modelled: the receiver's recovered bit clock is
// the sender's bit clock) with its own delay of 10 to 30 bits.
//
// The test runs in rounds, one per control cycle, 250 to 400 ns apart. In each
// round every DAQ board sends one random I/Q sample (every tenth round uses
// near full-scale values so that the sums saturate). A processing-unit model
// on pu_clk_out checks each partial sum from the concentrator (link #2)
// against the saturated sum of the four samples, checks the samples of its own
// four boards (link #1), adds everything up and sends the total to the vector
// modulator (link #3), where it is checked again. Latency from the start of a
// round to the vector modulator is measured.
//
// Mechanisms forced: in some rounds one bit of a concentrator board's frame is
// flipped on the line, so the frame fails its CRC, the concentrator times out
// and sends the sum of the other three with missing[] set; once a line to the
// processing unit slips by one bit, so that receiver must realign. The test
// fails if saturation, a CRC error, a concentrator timeout, an idle insertion,
// an idle removal or the realignment never happened.
module tb_lll_llrf_system;
  localparam int      NC = 4, NM = 4, ND = NC + NM;
  localparam realtime TBIT  = 0.32;
  localparam int      NROUNDS = 150;

  logic                 rst_n = 1'b1;
  logic [ND-1:0]        daq_ser_clk, daq_clk_out, daq_iq_valid = '0, daq_iq_ready, daq_ser_tx;
  logic [ND-1:0][15:0]  daq_i = '0, daq_q = '0;
  logic [ND-1:0]        l1_ser_rx;
  logic                 conc_ser_clk, conc_ser_tx, conc_overrun;
  logic [NC-1:0]        conc_missing;
  logic                 l2_ser_rx;
  logic                 pu_ser_clk, pu_clk_out, pu_sum_valid, pu_vm_ready, pu_ser_tx;
  logic [15:0]          pu_sum_i, pu_sum_q;
  logic [NM-1:0]        pu_daq_valid;
  logic [NM-1:0][15:0]  pu_daq_i, pu_daq_q;
  logic                 pu_vm_valid = 1'b0;
  logic [15:0]          pu_vm_i = '0, pu_vm_q = '0;
  logic                 vm_ser_clk, l3_ser_rx, vm_clk_out, vm_iq_valid;
  logic [15:0]          vm_i, vm_q;
  logic [ND+1:0]        link_crc_err, link_frame_err, link_aligned;
  logic [ND+1:0]        link_realign, link_cc_insert, link_cc_remove, link_buf_err;

  lll_llrf_system dut (
    .rst_n,
    .daq_ser_clk, .daq_clk_out, .daq_iq_valid, .daq_i, .daq_q, .daq_iq_ready, .daq_ser_tx,
    .l1_ser_rx, .l1_rx_ser_clk(daq_ser_clk),
    .conc_ser_clk, .conc_ser_tx, .conc_missing, .conc_overrun,
    .l2_ser_rx, .l2_rx_ser_clk(conc_ser_clk),
    .pu_ser_clk, .pu_clk_out, .pu_sum_valid, .pu_sum_i, .pu_sum_q,
    .pu_daq_valid, .pu_daq_i, .pu_daq_q, .pu_vm_valid, .pu_vm_i, .pu_vm_q, .pu_vm_ready, .pu_ser_tx,
    .vm_ser_clk, .l3_ser_rx, .l3_rx_ser_clk(pu_ser_clk), .vm_clk_out, .vm_iq_valid, .vm_i, .vm_q,
    .link_crc_err, .link_frame_err, .link_aligned, .link_realign, .link_cc_insert, .link_cc_remove, .link_buf_err
  );

  int checks = 0, failures = 0;
  bit started = 0;   // reset has been applied: outputs before that are not looked at

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- clocks ----------------
  realtime per[ND+3];
  initial begin
    for (int k = 0; k < ND + 3; k++) per[k] = TBIT * (1.0 + (real'($urandom_range(400)) - 200.0) * 1.0e-5);
  end
  // The offsets are far below the 1 ps time resolution per bit, so each edge
  // is placed at its ideal time rounded to 1 ps: the average frequency is
  // exact, with at most 0.5 ps of jitter.
  logic [ND+2:0] bclk = '0;
  for (genvar k = 0; k < ND + 3; k++) begin : g_clk
    initial begin
      realtime t_next;
      t_next = 0.05;
      forever begin
        #(t_next - $realtime);
        bclk[k] = ~bclk[k];
        t_next += per[k] / 2;
      end
    end
  end
  assign daq_ser_clk  = bclk[ND-1:0];
  assign conc_ser_clk = bclk[ND];
  assign pu_ser_clk   = bclk[ND+1];
  assign vm_ser_clk   = bclk[ND+2];

  // ---------------- lines ----------------
  int            dly[ND+2];
  logic [ND-1:0] flip = '0;
  initial for (int k = 0; k < ND + 2; k++) dly[k] = $urandom_range(10, 30);
  for (genvar d = 0; d < ND; d++) begin : g_line
    logic [63:0] sr = '0;
    always @(posedge daq_ser_clk[d]) sr <= {sr[62:0], daq_ser_tx[d] ^ flip[d]};
    assign l1_ser_rx[d] = sr[dly[d]-1];
  end
  logic [63:0] sr2 = '0, sr3 = '0;
  always @(posedge conc_ser_clk) sr2 <= {sr2[62:0], conc_ser_tx};
  always @(posedge pu_ser_clk)   sr3 <= {sr3[62:0], pu_ser_tx};
  assign l2_ser_rx = sr2[dly[ND]-1];
  assign l3_ser_rx = sr3[dly[ND+1]-1];

  // ---------------- mechanism counters ----------------
  int n_ins = 0, n_rem = 0, n_realign = 0, n_crc = 0, n_timeout = 0, n_sat = 0;
  for (genvar k = 0; k < ND + 2; k++) begin : g_mon
    always @(posedge link_cc_insert[k]) n_ins++;
    always @(posedge link_cc_remove[k]) n_rem++;
    always @(posedge link_realign[k])   n_realign++;
    always @(posedge link_buf_err[k]) begin
      if (started) begin
        failures++;
        $display("FAIL elastic buffer error on link %0d at %0t", k, $realtime);
      end
    end
  end
  bit slipped = 0;
  int n_slip_realign = 0;
  always @(posedge link_realign[NC]) if (slipped) n_slip_realign++;
  for (genvar d = 0; d < ND; d++) begin : g_crc
    always @(posedge link_crc_err[d]) n_crc++;
  end
  always @(posedge conc_overrun) begin
    if (started) begin
      failures++;
      $display("FAIL concentrator overrun at %0t", $realtime);
    end
  end
  // errors on links that are never corrupted
  always @(posedge link_crc_err[ND] or posedge link_crc_err[ND+1] or posedge link_frame_err[ND] or
           posedge link_frame_err[ND+1]) begin
    if (started) begin
      failures++;
      $display("FAIL error on link #2 or #3 at %0t", $realtime);
    end
  end

  // ---------------- expected values ----------------
  typedef struct {
    logic [15:0]         s_i, s_q;        // expected concentrator sum
    logic [NC-1:0]       miss;
    logic [NM-1:0][15:0] m_i, m_q;        // samples of the processing unit's own boards
    realtime             t0;
  } round_t;
  round_t rounds[$];
  round_t to_vm[$];

  function automatic logic [15:0] sat(input int v);
    if (v > 32767) return 16'h7FFF;
    if (v < -32768) return 16'h8000;
    return v[15:0];
  endfunction

  // ---------------- processing unit model ----------------
  logic [NM-1:0][15:0] got_i, got_q;
  logic [NM-1:0]       got = '0;
  logic                got_sum = 1'b0;
  logic [15:0]         gs_i, gs_q;
  logic                ready_seen = 1'b0;
  int                  n_vm_sent = 0;
  initial begin got_i = '0; got_q = '0; gs_i = '0; gs_q = '0; end

  always @(negedge pu_clk_out) begin
    if (started) begin
      // handshake of the previous cycle
      if (pu_vm_valid && ready_seen) begin
        pu_vm_valid <= 1'b0;
        n_vm_sent++;
      end
      if (pu_sum_valid) begin
        if (got_sum) begin failures++; $display("FAIL second partial sum before the round completed"); end
        got_sum = 1'b1; gs_i = pu_sum_i; gs_q = pu_sum_q;
      end
      for (int m = 0; m < NM; m++) begin
        if (pu_daq_valid[m]) begin
          if (got[m]) begin failures++; $display("FAIL board %0d sent twice in a round at %0t", NC + m, $realtime); end
          got[m] = 1'b1; got_i[m] = pu_daq_i[m]; got_q[m] = pu_daq_q[m];
        end
      end
      if (got_sum && (&got)) begin
        round_t r;
        int ti, tq;
        checks++;
        if (rounds.size() == 0) begin
          failures++;
          $display("FAIL data at the processing unit without a round");
        end else begin
          r = rounds.pop_front();
          if (gs_i !== r.s_i || gs_q !== r.s_q || conc_missing !== r.miss) begin
            failures++;
            $display("FAIL partial sum %h %h missing %b, expected %h %h missing %b",
                     gs_i, gs_q, conc_missing, r.s_i, r.s_q, r.miss);
          end
          if (r.miss != '0) n_timeout++;
          ti = int'(signed'(gs_i)); tq = int'(signed'(gs_q));
          for (int m = 0; m < NM; m++) begin
            checks++;
            if (got_i[m] !== r.m_i[m] || got_q[m] !== r.m_q[m]) begin
              failures++;
              $display("FAIL board %0d sample %h %h expected %h %h", NC + m, got_i[m], got_q[m], r.m_i[m], r.m_q[m]);
            end
            ti += int'(signed'(got_i[m]));
            tq += int'(signed'(got_q[m]));
          end
          if (pu_vm_valid) begin
            failures++;
            $display("FAIL processing unit still busy with the previous round");
          end
          pu_vm_valid <= 1'b1;
          pu_vm_i <= sat(ti);
          pu_vm_q <= sat(tq);
          r.s_i = sat(ti); r.s_q = sat(tq);
          to_vm.push_back(r);
        end
        got_sum = 1'b0;
        got = '0;
      end
      ready_seen <= pu_vm_ready;
    end
  end

  // ---------------- vector modulator check ----------------
  realtime lat_max = 0.0, lat_min = 1.0e9;
  int      n_vm = 0;
  always @(negedge vm_clk_out) begin
    if (started && vm_iq_valid) begin
      round_t r;
      realtime lat;
      checks++;
      if (to_vm.size() == 0) begin
        failures++;
        $display("FAIL unexpected sample at the vector modulator at %0t: %h %h", $realtime, vm_i, vm_q);
      end else begin
        r = to_vm.pop_front();
        lat = $realtime - r.t0;
        if (vm_i !== r.s_i || vm_q !== r.s_q) begin
          failures++;
          $display("FAIL vector modulator got %h %h expected %h %h", vm_i, vm_q, r.s_i, r.s_q);
        end
        if (r.miss == '0) begin
          if (lat > lat_max) lat_max = lat;
          if (lat < lat_min) lat_min = lat;
          checks++;
          if (lat > 600.0) begin
            failures++;
            $display("FAIL three-link latency %0.1f ns", lat);
          end
        end
        n_vm++;
      end
    end
  end

  // ---------------- DAQ boards ----------------
  // One sender per board; round() posts a request, the sender waits for the
  // board's word clock and the ready handshake.
  int          req_n[ND], done_n[ND];
  logic [15:0] req_i[ND], req_q[ND];
  bit          req_bad[ND];
  initial for (int d = 0; d < ND; d++) begin
    req_n[d] = 0; done_n[d] = 0; req_i[d] = '0; req_q[d] = '0; req_bad[d] = 0;
  end
  for (genvar d = 0; d < ND; d++) begin : g_daq
    initial begin
      forever begin
        wait (req_n[d] != done_n[d]);
        @(posedge daq_clk_out[d]);
        while (!daq_iq_ready[d]) @(posedge daq_clk_out[d]);
        #0.1;
        daq_iq_valid[d] = 1'b1;
        daq_i[d] = req_i[d];
        daq_q[d] = req_q[d];
        @(posedge daq_clk_out[d]);
        #0.1;
        daq_iq_valid[d] = 1'b0;
        done_n[d]++;
        if (req_bad[d]) begin
          // the I word leaves two word clocks after acceptance; flip one frame bit
          #(2 * 20 * per[d] + $urandom_range(3, 56) * per[d] - 0.2);
          flip[d] = 1'b1;
          #(per[d]);
          flip[d] = 1'b0;
        end
      end
    end
  end

  task automatic round(input int n);
    round_t r;
    logic [ND-1:0][15:0] si, sq;
    int bad, ti, tq;
    bit big;
    big = (n % 10 == 5);
    bad = (n % 12 == 7) ? int'($urandom_range(NC - 1)) : -1;
    ti = 0; tq = 0;
    for (int d = 0; d < ND; d++) begin
      si[d] = big ? 16'h7000 + 16'($urandom_range(4095)) : 16'($signed($urandom_range(8000)) - 4000);
      sq[d] = big ? 16'h9000 - 16'($urandom_range(4095)) : 16'($signed($urandom_range(8000)) - 4000);
      if (d < NC && d != bad) begin
        ti += int'(signed'(si[d]));
        tq += int'(signed'(sq[d]));
      end
    end
    if (big) n_sat++;
    r.s_i = sat(ti); r.s_q = sat(tq);
    r.miss = '0;
    if (bad >= 0) r.miss[bad] = 1'b1;
    for (int m = 0; m < NM; m++) begin r.m_i[m] = si[NC + m]; r.m_q[m] = sq[NC + m]; end
    r.t0 = $realtime;
    rounds.push_back(r);
    for (int d = 0; d < ND; d++) begin
      req_i[d] = si[d];
      req_q[d] = sq[d];
      req_bad[d] = (d == bad);
      req_n[d]++;
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #40 rst_n = 1'b1;
    started = 1;
    #1500;
    checks++;
    if (link_aligned !== '1) begin
      failures++;
      $display("FAIL links not aligned after reset: %b", link_aligned);
    end
    for (int n = 0; n < NROUNDS; n++) begin
      round(n);
      if (n == NROUNDS / 2) begin
        // one line to the processing unit slips by one bit between rounds
        #250;
        dly[NC] = dly[NC] + 1;
        slipped = 1;
        #150;
      end else begin
        #($urandom_range(250, 400));
      end
    end
    #1000;
    checks++;
    if (rounds.size() != 0 || to_vm.size() != 0 || n_vm != NROUNDS) begin
      failures++;
      $display("FAIL %0d rounds reached the vector modulator, %0d of %0d", n_vm, n_vm, NROUNDS);
    end
    $display("rounds %0d, saturated %0d, CRC errors %0d, concentrator timeouts %0d", n_vm, n_sat, n_crc, n_timeout);
    $display("idle insertions %0d, removals %0d, realignments %0d (%0d after the slip)", n_ins, n_rem, n_realign, n_slip_realign);
    $display("DAQ to vector modulator over three links: %0.1f .. %0.1f ns", lat_min, lat_max);
    checks++; if (n_sat == 0)     begin failures++; $display("FAIL no saturated sum"); end
    checks++; if (n_crc == 0)     begin failures++; $display("FAIL no CRC error"); end
    checks++; if (n_timeout == 0) begin failures++; $display("FAIL no concentrator timeout"); end
    checks++; if (n_ins == 0)     begin failures++; $display("FAIL no idle insertion"); end
    checks++; if (n_rem == 0)     begin failures++; $display("FAIL no idle removal"); end
    checks++; if (n_slip_realign == 0) begin failures++; $display("FAIL no realignment after the slip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
