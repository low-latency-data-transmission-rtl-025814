// Frame receiver of the low latency link.
//
// Watches the 16-bit words coming out of the receive PCS. A frame starts at the
// first all-data word that follows a word holding a control character, as the
// frame format defines; that word is I, the next is Q and the third is the
// CRC-16 of I and Q. The receiver recomputes the CRC and, on a match, presents
// I and Q with a one-cycle iq_valid pulse. A mismatch gives a crc_err pulse
// instead; a control word or a flagged decoding error inside a frame aborts it
// with a frame_err pulse.
//
// Timing: the outputs are registered; iq_valid (or crc_err) is high for the
// clock cycle that follows the edge taking in the CRC word. rx_err marks a word the decoder could not decode or
// that arrived before symbol alignment; such a word counts as a control word.
module lll_frame_rx
  import lll_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  pcs_word_t   rx_word,
  input  logic        rx_err,
  output logic        iq_valid,
  output logic [15:0] i_data,
  output logic [15:0] q_data,
  output logic        crc_err,
  output logic        frame_err
);
  typedef enum logic [1:0] {S_HUNT, S_DATA_IDLE, S_Q, S_CRC} state_t;

  state_t      state;
  logic [15:0] i_hold, q_hold, crc_calc;
  logic        is_data;

  assign is_data = (rx_word.k == 2'b00) && !rx_err;

  lll_crc16 u_crc (.i_word(i_hold), .q_word(q_hold), .crc(crc_calc));

  // S_HUNT: last word was control, so the next data word starts a frame.
  // S_DATA_IDLE: data seen outside a frame; wait for a control word.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_DATA_IDLE;
      i_hold    <= '0;
      q_hold    <= '0;
      i_data    <= '0;
      q_data    <= '0;
      iq_valid  <= 1'b0;
      crc_err   <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      iq_valid  <= 1'b0;
      crc_err   <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_HUNT: if (is_data) begin
          i_hold <= rx_word.data;
          state  <= S_Q;
        end
        S_DATA_IDLE: if (!is_data) state <= S_HUNT;
        S_Q: begin
          if (is_data) begin
            q_hold <= rx_word.data;
            state  <= S_CRC;
          end else begin
            frame_err <= 1'b1;
            state     <= S_HUNT;
          end
        end
        S_CRC: begin
          if (!is_data) begin
            frame_err <= 1'b1;
            state     <= S_HUNT;
          end else begin
            if (rx_word.data == crc_calc) begin
              iq_valid <= 1'b1;
              i_data   <= i_hold;
              q_data   <= q_hold;
            end else begin
              crc_err  <= 1'b1;
            end
            state <= S_DATA_IDLE;
          end
        end
        default: state <= S_DATA_IDLE;
      endcase
    end
  end
endmodule
