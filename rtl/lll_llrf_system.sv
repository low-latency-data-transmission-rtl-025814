// Link network of a semi-distributed LLRF controller.
//
// Wires the low latency links the way the signals flow between the modules:
//   link #1: every DAQ board to either the data concentrator (the first
//            N_CONC boards) or the main processing unit (the other N_MAIN);
//   link #2: data concentrator to the processing unit, carrying the sum of
//            its boards' partial vector sums (lll_concentrator);
//   link #3: processing unit to the vector modulator.
// Each link instance holds both ends: its transmitter sits in the sending
// module, its receiver in the receiving one. The serial lines are ports, so
// the fibres or backplane lanes (and, in a testbench, their delays) are
// outside. The DAQ boards, the processing unit's controller and the vector
// modulator are not part of this RTL: their sample interfaces are ports.
//
// Clocks: every module has its own bit clock from its own transceiver PLL
// (daq_ser_clk, conc_ser_clk, pu_ser_clk, vm_ser_clk), and every receiver gets
// the bit clock its clock recovery extracts from the line (*_rx_ser_clk). All
// links run in the default configuration (TX phase FIFO bypassed, RX elastic
// buffer on), so each module's logic runs on its own transmit word clock: the
// receive buffers of the incoming links are read with it. The DAQ boards
// therefore drive their samples on daq_clk_out, the processing unit works on
// pu_clk_out and the vector modulator on vm_clk_out. The vector modulator
// has no outgoing link, so its word clock comes from a divider on its own
// bit clock, as in a transmitter.
//
// Status: per link (DAQ links first, then link #2, then link #3) the CRC and
// framing errors, comma alignment and realignment, and the elastic buffer's
// idle insertions, removals and under/overflow; each is a pulse or level in
// that link's receive clock domain. The concentrator's missing[] and overrun
// are in its own clock domain.
//
// The hop structure and link numbering are the controller's own. The number
// of DAQ boards at each unit, the use of the default link configuration on
// every hop and the clocking scheme are this design's choices.
module lll_llrf_system
  import lll_pkg::*;
#(
  parameter int unsigned N_CONC          = 4,  // DAQ boards at the concentrator
  parameter int unsigned N_MAIN          = 4,  // DAQ boards at the processing unit
  parameter int unsigned CLK_COR_MIN_LAT = 4
) (
  input  logic                       rst_n,
  // DAQ boards (link #1 transmit ends)
  input  logic [N_CONC+N_MAIN-1:0]        daq_ser_clk,
  output logic [N_CONC+N_MAIN-1:0]        daq_clk_out,
  input  logic [N_CONC+N_MAIN-1:0]        daq_iq_valid,
  input  logic [N_CONC+N_MAIN-1:0][15:0]  daq_i,
  input  logic [N_CONC+N_MAIN-1:0][15:0]  daq_q,
  output logic [N_CONC+N_MAIN-1:0]        daq_iq_ready,
  output logic [N_CONC+N_MAIN-1:0]        daq_ser_tx,
  // link #1 receive ends (at the concentrator or processing unit)
  input  logic [N_CONC+N_MAIN-1:0]        l1_ser_rx,
  input  logic [N_CONC+N_MAIN-1:0]        l1_rx_ser_clk,
  // data concentrator
  input  logic                       conc_ser_clk,
  output logic                       conc_ser_tx,
  output logic [N_CONC-1:0]          conc_missing,
  output logic                       conc_overrun,
  // link #2 receive end, processing unit
  input  logic                       l2_ser_rx,
  input  logic                       l2_rx_ser_clk,
  // processing unit (pu_clk_out domain)
  input  logic                       pu_ser_clk,
  output logic                       pu_clk_out,
  output logic                       pu_sum_valid,     // partial sum from the concentrator
  output logic [15:0]                pu_sum_i,
  output logic [15:0]                pu_sum_q,
  output logic [N_MAIN-1:0]          pu_daq_valid,     // partial sums of its own DAQ boards
  output logic [N_MAIN-1:0][15:0]    pu_daq_i,
  output logic [N_MAIN-1:0][15:0]    pu_daq_q,
  input  logic                       pu_vm_valid,      // drive signal for the vector modulator
  input  logic [15:0]                pu_vm_i,
  input  logic [15:0]                pu_vm_q,
  output logic                       pu_vm_ready,
  output logic                       pu_ser_tx,
  // link #3 receive end, vector modulator (vm_clk_out domain)
  input  logic                       vm_ser_clk,
  input  logic                       l3_ser_rx,
  input  logic                       l3_rx_ser_clk,
  output logic                       vm_clk_out,
  output logic                       vm_iq_valid,
  output logic [15:0]                vm_i,
  output logic [15:0]                vm_q,
  // errors of all links: [N_CONC+N_MAIN-1:0] link #1, then link #2, link #3
  output logic [N_CONC+N_MAIN+1:0]   link_crc_err,
  output logic [N_CONC+N_MAIN+1:0]   link_frame_err,
  output logic [N_CONC+N_MAIN+1:0]   link_aligned,
  output logic [N_CONC+N_MAIN+1:0]   link_realign,     // comma alignment moved
  output logic [N_CONC+N_MAIN+1:0]   link_cc_insert,   // elastic buffer repeated an idle word
  output logic [N_CONC+N_MAIN+1:0]   link_cc_remove,   // elastic buffer dropped an idle word
  output logic [N_CONC+N_MAIN+1:0]   link_buf_err      // elastic buffer under- or overflow
);
  localparam int unsigned ND = N_CONC + N_MAIN;

  logic                conc_clk;
  logic [N_CONC-1:0]   c_valid;
  logic [N_CONC-1:0][15:0] c_i, c_q;
  logic                sum_valid, sum_ready;
  logic [15:0]         sum_i, sum_q;
  logic [ND-1:0]       l1_valid;
  logic [ND-1:0][15:0] l1_i, l1_q;
  logic [ND-1:0]       l1_user_clk;
  logic                vm_word_clk_unused;
  logic [ND+1:0]       buf_unf, buf_ovf;

  // Each receiving module reads its incoming links with its own word clock.
  for (genvar d = 0; d < ND; d++) begin : g_l1_clk
    if (d < N_CONC) begin : g_c
      assign l1_user_clk[d] = conc_clk;
    end else begin : g_m
      assign l1_user_clk[d] = pu_clk_out;
    end
  end

  // ---------------- link #1: DAQ boards ----------------
  for (genvar d = 0; d < ND; d++) begin : g_l1
    lll_link_top #(.CLK_COR_MIN_LAT(CLK_COR_MIN_LAT)) u_link (
      .rst_n,
      .tx_ser_clk(daq_ser_clk[d]), .tx_user_clk(1'b0),
      .rx_ser_clk(l1_rx_ser_clk[d]), .rx_user_clk(l1_user_clk[d]),
      .tx_clk_out(daq_clk_out[d]), .rx_clk_out(),
      .tx_iq_valid(daq_iq_valid[d]), .tx_i(daq_i[d]), .tx_q(daq_q[d]), .tx_iq_ready(daq_iq_ready[d]),
      .ser_tx(daq_ser_tx[d]), .ser_rx(l1_ser_rx[d]),
      .rx_iq_valid(l1_valid[d]), .rx_i(l1_i[d]), .rx_q(l1_q[d]),
      .rx_crc_err(link_crc_err[d]), .rx_frame_err(link_frame_err[d]),
      .rx_aligned(link_aligned[d]), .rx_comma_det(), .rx_realign(link_realign[d]), .rx_code_err(), .rx_disp_err(),
      .rx_cc_insert(link_cc_insert[d]), .rx_cc_remove(link_cc_remove[d]),
      .rx_buf_underflow(buf_unf[d]), .rx_buf_overflow(buf_ovf[d]), .rx_buf_level(),
      .tx_fifo_error()
    );
  end

  assign c_valid      = l1_valid[N_CONC-1:0];
  assign c_i          = l1_i[N_CONC-1:0];
  assign c_q          = l1_q[N_CONC-1:0];
  assign pu_daq_valid = l1_valid[ND-1:N_CONC];
  assign pu_daq_i     = l1_i[ND-1:N_CONC];
  assign pu_daq_q     = l1_q[ND-1:N_CONC];

  // ---------------- data concentrator ----------------
  lll_concentrator #(.N(N_CONC)) u_conc (
    .clk(conc_clk), .rst_n, .in_valid(c_valid), .in_i(c_i), .in_q(c_q),
    .out_valid(sum_valid), .out_i(sum_i), .out_q(sum_q), .out_ready(sum_ready),
    .missing(conc_missing), .overrun(conc_overrun)
  );

  // ---------------- link #2: concentrator to processing unit ----------------
  lll_link_top #(.CLK_COR_MIN_LAT(CLK_COR_MIN_LAT)) u_link2 (
    .rst_n,
    .tx_ser_clk(conc_ser_clk), .tx_user_clk(1'b0),
    .rx_ser_clk(l2_rx_ser_clk), .rx_user_clk(pu_clk_out),
    .tx_clk_out(conc_clk), .rx_clk_out(),
    .tx_iq_valid(sum_valid), .tx_i(sum_i), .tx_q(sum_q), .tx_iq_ready(sum_ready),
    .ser_tx(conc_ser_tx), .ser_rx(l2_ser_rx),
    .rx_iq_valid(pu_sum_valid), .rx_i(pu_sum_i), .rx_q(pu_sum_q),
    .rx_crc_err(link_crc_err[ND]), .rx_frame_err(link_frame_err[ND]),
    .rx_aligned(link_aligned[ND]), .rx_comma_det(), .rx_realign(link_realign[ND]), .rx_code_err(), .rx_disp_err(),
      .rx_cc_insert(link_cc_insert[ND]), .rx_cc_remove(link_cc_remove[ND]),
      .rx_buf_underflow(buf_unf[ND]), .rx_buf_overflow(buf_ovf[ND]), .rx_buf_level(),
    .tx_fifo_error()
  );

  // ---------------- link #3: processing unit to vector modulator ----------------
  lll_link_top #(.CLK_COR_MIN_LAT(CLK_COR_MIN_LAT)) u_link3 (
    .rst_n,
    .tx_ser_clk(pu_ser_clk), .tx_user_clk(1'b0),
    .rx_ser_clk(l3_rx_ser_clk), .rx_user_clk(vm_clk_out),
    .tx_clk_out(pu_clk_out), .rx_clk_out(),
    .tx_iq_valid(pu_vm_valid), .tx_i(pu_vm_i), .tx_q(pu_vm_q), .tx_iq_ready(pu_vm_ready),
    .ser_tx(pu_ser_tx), .ser_rx(l3_ser_rx),
    .rx_iq_valid(vm_iq_valid), .rx_i(vm_i), .rx_q(vm_q),
    .rx_crc_err(link_crc_err[ND+1]), .rx_frame_err(link_frame_err[ND+1]),
    .rx_aligned(link_aligned[ND+1]), .rx_comma_det(), .rx_realign(link_realign[ND+1]), .rx_code_err(), .rx_disp_err(),
      .rx_cc_insert(link_cc_insert[ND+1]), .rx_cc_remove(link_cc_remove[ND+1]),
      .rx_buf_underflow(buf_unf[ND+1]), .rx_buf_overflow(buf_ovf[ND+1]), .rx_buf_level(),
    .tx_fifo_error()
  );

  assign link_buf_err = buf_unf | buf_ovf;

  // The vector modulator's word clock: its own bit clock divided by 20, from a
  // serializer whose line output is not used.
  lll_piso u_vm_clk (.ser_clk(vm_ser_clk), .rst_n, .par_in('0), .ser_out(vm_word_clk_unused), .word_clk(vm_clk_out));
endmodule
