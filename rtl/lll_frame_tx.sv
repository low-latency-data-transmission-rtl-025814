// Frame transmitter of the low latency link.
//
// Sends one I/Q sample as a frame of three 16-bit data words: I, Q and the
// CRC-16 of both. Between frames it sends idle words, each the comma K28.5 in
// symbol 0 and the idle character K28.0 in symbol 1, so comma and idle
// alternate on the line and keep the receiver's symbol alignment and clock
// correction working. The frame format follows the document; the handshake is
// this design's own.
//
// Interface: a sample is taken when iq_valid and iq_ready are both high at a
// clock edge. Its I word appears on tx_word on the next edge, followed by Q and
// the CRC on the two edges after that. iq_ready is low while a frame is sent and
// during the MIN_IDLE idle words that must follow every frame, so the receiver
// always sees a control word before the next frame's first data word.
module lll_frame_tx
  import lll_pkg::*;
#(
  parameter int unsigned MIN_IDLE = 1   // idle words forced after each frame, at least 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        iq_valid,
  input  logic [15:0] i_data,
  input  logic [15:0] q_data,
  output logic        iq_ready,
  output pcs_word_t   tx_word
);
  typedef enum logic [1:0] {S_IDLE, S_Q, S_CRC, S_GAP} state_t;

  state_t      state;
  logic [15:0] q_hold, crc_hold;
  logic [15:0] crc_new;
  logic [$clog2(MIN_IDLE+1)-1:0] gap_cnt;

  lll_crc16 u_crc (.i_word(i_data), .q_word(q_data), .crc(crc_new));

  assign iq_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      tx_word  <= IDLE_WORD;
      q_hold   <= '0;
      crc_hold <= '0;
      gap_cnt  <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (iq_valid) begin
            tx_word  <= '{k: 2'b00, data: i_data};
            q_hold   <= q_data;
            crc_hold <= crc_new;
            state    <= S_Q;
          end else begin
            tx_word  <= IDLE_WORD;
          end
        end
        S_Q: begin
          tx_word <= '{k: 2'b00, data: q_hold};
          state   <= S_CRC;
        end
        S_CRC: begin
          tx_word <= '{k: 2'b00, data: crc_hold};
          gap_cnt <= '0;
          state   <= S_GAP;
        end
        S_GAP: begin
          tx_word <= IDLE_WORD;
          gap_cnt <= gap_cnt + 1'b1;
          if (32'(gap_cnt) + 1 >= MIN_IDLE) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rule: after a sample is taken, no new one is accepted until
  // the frame and its gap have gone out.
  a_busy_after_accept: assert property (@(posedge clk) disable iff (!rst_n)
    iq_valid && iq_ready |=> !iq_ready);
endmodule
