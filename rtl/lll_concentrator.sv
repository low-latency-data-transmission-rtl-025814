// Data concentrator: sums the partial vector sums of several DAQ boards.
//
// Each DAQ board sends the partial vector sum of its own channels, one I/Q
// sample per control cycle, over its own link. The concentrator collects one
// sample from every input and sends on their sum (I and Q added separately) as
// the partial vector sum of its group of boards. The document gives this
// function (receive the DAQ signals, send the calculated partial vector sum
// over the next link); how it is done is this design's choice:
//   - I and Q are 16-bit two's complement; the sum saturates to 16 bits.
//   - A sample is complete when every input has delivered one. If some input
//     is still silent at the WINDOW-th clock edge (counting the edge of the
//     first arrival as the first), the sum of the inputs that did arrive is
//     sent and missing[] shows which were absent.
//   - The result waits in a one-deep output register until the outgoing link
//     takes it (out_valid/out_ready); a newer result overwrites it and raises
//     overrun for one clock.
// Timing: out_valid rises one clock after the last input sample arrives.
// All inputs are in one clock domain (the receive buffers of the incoming
// links bring them to the concentrator's clock).
module lll_concentrator #(
  parameter int unsigned N      = 4,    // DAQ inputs
  parameter int unsigned WINDOW = 16    // clocks to wait for late inputs
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         in_valid,
  input  logic [N-1:0][15:0]   in_i,
  input  logic [N-1:0][15:0]   in_q,
  output logic                 out_valid,
  output logic [15:0]          out_i,
  output logic [15:0]          out_q,
  input  logic                 out_ready,
  output logic [N-1:0]         missing,
  output logic                 overrun
);
  localparam int unsigned SW = 16 + $clog2(N + 1);

  logic [N-1:0]       have;
  logic [N-1:0][15:0] held_i, held_q;
  logic [$clog2(WINDOW+1)-1:0] wait_cnt;
  logic [N-1:0]       have_next;
  logic               complete, timeout;
  logic signed [SW-1:0] sum_i, sum_q;

  function automatic logic [15:0] sat16(input logic signed [SW-1:0] v);
    if (v > SW'(32767))       return 16'h7FFF;
    else if (v < -SW'(32768)) return 16'h8000;
    else                      return v[15:0];
  endfunction

  // Samples held so far plus those arriving now.
  always_comb begin
    have_next = have | in_valid;
    complete  = &have_next;
    timeout   = (have != '0) && (32'(wait_cnt) >= WINDOW - 1);
    sum_i     = '0;
    sum_q     = '0;
    for (int k = 0; k < N; k++) begin
      if (in_valid[k]) begin
        sum_i += SW'(signed'(in_i[k]));
        sum_q += SW'(signed'(in_q[k]));
      end else if (have[k]) begin
        sum_i += SW'(signed'(held_i[k]));
        sum_q += SW'(signed'(held_q[k]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have      <= '0;
      held_i    <= '0;
      held_q    <= '0;
      wait_cnt  <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      missing   <= '0;
      overrun   <= 1'b0;
    end else begin
      overrun <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      for (int k = 0; k < N; k++) begin
        if (in_valid[k]) begin
          held_i[k] <= in_i[k];
          held_q[k] <= in_q[k];
        end
      end
      if (complete || timeout) begin
        out_valid <= 1'b1;
        out_i     <= sat16(sum_i);
        out_q     <= sat16(sum_q);
        missing   <= ~have_next;
        overrun   <= out_valid && !out_ready;
        have      <= '0;
        wait_cnt  <= '0;
      end else begin
        have <= have_next;
        if (have_next != '0) wait_cnt <= wait_cnt + 1'b1;
      end
    end
  end

  // A waiting sum stays until link #2 takes it; it can only be replaced by a
  // newer sum, which is then flagged as an overrun.
  a_hold_until_taken: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid);
  a_overrun_flagged: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && (complete || timeout) |=> overrun);
endmodule
