// Testbench for the data concentrator.
//
// Drives the inputs with random samples on the falling clock edge and keeps a
// reference model of the concentrator's contract, advanced on every rising
// edge: samples are held per input until every input has one (then the
// saturated I and Q sums go out on the next edge) or until the WINDOW-th edge
// counting the first arrival (then the sum of what arrived goes out and
// missing[] names the silent inputs). The output register is compared with
// the model after every edge: out_valid, out_i, out_q, missing and overrun.
// Phases: (1) all inputs every cycle, full-scale values so the sums saturate;
// (2) random arrival order, small values; (3) one input silenced so the
// timeout fires; (4) out_ready held low so results overwrite each other and
// overrun is raised. The run fails if saturation, timeout or overrun never
// happened.
module tb_lll_concentrator;
  localparam int unsigned N = 4, WINDOW = 16;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] in_valid = '0;
  logic [N-1:0][15:0] in_i = '0, in_q = '0;
  logic out_valid, out_ready = 1'b1, overrun;
  logic [15:0] out_i, out_q;
  logic [N-1:0] missing;
  int checks = 0, failures = 0;
  int n_sat = 0, n_timeout = 0, n_overrun = 0, n_out = 0;

  lll_concentrator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  bit          m_have[N];
  int          m_held_i[N], m_held_q[N];
  int          m_age;                       // edges since the first arrival
  bit          m_valid, m_overrun;
  logic [15:0] m_i, m_q;
  logic [N-1:0] m_missing;

  function automatic logic [15:0] sat(input int v);
    if (v > 32767) return 16'h7FFF;
    if (v < -32768) return 16'h8000;
    return v[15:0];
  endfunction

  task automatic model_edge();
    bit any, all;
    int si, sq;
    logic [N-1:0] miss;
    any = 0; all = 1; si = 0; sq = 0; miss = '0;
    m_overrun = 0;
    if (m_valid && out_ready) m_valid = 0;
    for (int k = 0; k < N; k++) begin
      if (in_valid[k]) begin
        m_have[k] = 1;
        m_held_i[k] = int'(signed'(in_i[k]));
        m_held_q[k] = int'(signed'(in_q[k]));
      end
      if (m_have[k]) begin
        any = 1;
        si += m_held_i[k];
        sq += m_held_q[k];
      end else begin
        all = 0;
        miss[k] = 1;
      end
    end
    if (any) m_age++;
    if (all || m_age >= WINDOW) begin
      if (si != int'(signed'(sat(si))) || sq != int'(signed'(sat(sq)))) n_sat++;
      if (!all) n_timeout++;
      m_overrun = m_valid;     // m_valid here is already cleared if taken
      if (m_overrun) n_overrun++;
      m_valid = 1;
      m_i = sat(si);
      m_q = sat(sq);
      m_missing = miss;
      n_out++;
      m_age = 0;
      for (int k = 0; k < N; k++) m_have[k] = 0;
    end
  endtask

  // The model runs at the rising edge, with the inputs as the DUT sees them.
  always @(posedge clk) begin
    if (rst_n) begin
      model_edge();
      #1;
      checks++;
      if (out_valid !== m_valid || overrun !== m_overrun ||
          (m_valid && (out_i !== m_i || out_q !== m_q || missing !== m_missing))) begin
        failures++;
        if (failures < 20)
          $display("FAIL t=%0t valid %b/%b overrun %b/%b I %h/%h Q %h/%h missing %b/%b", $time,
                   out_valid, m_valid, overrun, m_overrun, out_i, m_i, out_q, m_q, missing, m_missing);
      end
    end
  end

  // phase: 0 = all every cycle, full scale; 1 = random; 2 = input 2 silent; 3 = no ready
  int phase = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < N; k++) begin
        case (phase)
          0: begin
            in_valid[k] = 1'b1;
            in_i[k] = ($urandom_range(1) != 0) ? 16'h7F00 + 16'($urandom_range(255)) : 16'h8000 + 16'($urandom_range(255));
            in_q[k] = 16'($urandom);
          end
          default: begin
            in_valid[k] = ($urandom_range(3) == 0) && !(phase == 2 && k == 2);
            in_i[k] = 16'($signed($urandom_range(2000)) - 1000);
            in_q[k] = 16'($urandom);
          end
        endcase
      end
      out_ready = (phase == 3) ? 1'b0 : ($urandom_range(3) != 0);
    end
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      m_have[k] = 0; m_held_i[k] = 0; m_held_q[k] = 0;
    end
    m_age = 0; m_valid = 0; m_overrun = 0; m_i = '0; m_q = '0; m_missing = '0;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    repeat (500)  @(posedge clk);
    phase = 1;
    repeat (3000) @(posedge clk);
    phase = 2;
    repeat (1000) @(posedge clk);
    phase = 3;
    repeat (500)  @(posedge clk);
    phase = 1;
    repeat (500)  @(posedge clk);
    #2;
    checks++;
    if (n_sat == 0 || n_timeout == 0 || n_overrun == 0) begin
      failures++;
      $display("FAIL coverage: saturated %0d, timeouts %0d, overruns %0d", n_sat, n_timeout, n_overrun);
    end
    $display("results %0d, saturated %0d, timeouts %0d, overruns %0d", n_out, n_sat, n_timeout, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
