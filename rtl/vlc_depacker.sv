// VLC frame de-packer (receive half of the VLC transceiver logic) with the
// self-recovery mechanism.
//
// Watches the transceiver's 32-bit parallel output (word aligned by the
// transceiver's comma alignment) for the sync word 0xff0001bc followed by
// the delimiter {0xff, len, 0xfb}. It then takes ceil(len/4) payload words
// and the CRC word, and checks the CRC-32 computed from the delimiter to
// the end of the payload. Payload words are passed on with the first byte
// moved back to bits 31:24, delayed by one word so that the last word can
// carry the verdict: out_eof comes with out_good set only when the check
// word matched. A frame that is cut short (a K character or a code error
// where payload is expected, as happens when the light path is
// interrupted) is ended at once with out_good low; the following logic
// masks such frames. The de-packer then hunts for the next sync word, so
// normal transfer resumes by itself when the path is restored. Lengths
// of 0 or above MAX_LEN are treated as a corrupt delimiter.
// Marking and masking bad frames follows the document; the one-word delay,
// the abort rules and the length limit are this design's choices.
module vlc_depacker
  import vlc_pkg::*;
#(
  parameter int unsigned MAX_LEN = ETH_MAX_LEN
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] rx_data,
  input  logic [3:0]  rx_charisk,
  input  logic        rx_err,       // 8B/10B code or disparity error
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        out_sof,
  output logic        out_eof,
  output logic        out_good,
  output logic [15:0] out_len,
  output logic        ev_good,      // pulse: frame passed its check
  output logic        ev_bad        // pulse: frame marked bad
);
  typedef enum logic [1:0] {D_HUNT, D_SFD, D_PAY, D_CHK} dstate_t;
  dstate_t     state;
  logic [31:0] crc;
  logic [15:0] words_left;
  logic        pend_v, pend_sof;
  logic [31:0] pend_d;

  wire is_sync = (rx_data == VLC_SYNC) && (rx_charisk == VLC_SYNC_K) && !rx_err;
  wire is_sfd  = (rx_data[31:24] == VLC_SFD_HI) && (rx_data[7:0] == VLC_SFD_LO) &&
                 (rx_charisk == VLC_SFD_K) && !rx_err;
  wire [15:0] sfd_len = rx_data[23:8];
  wire is_dat  = (rx_charisk == 4'b0000) && !rx_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_HUNT; crc <= CRC_INIT; words_left <= '0;
      pend_v <= 1'b0; pend_sof <= 1'b0; pend_d <= '0;
      out_valid <= 1'b0; out_data <= '0; out_sof <= 1'b0; out_eof <= 1'b0;
      out_good <= 1'b0; out_len <= '0; ev_good <= 1'b0; ev_bad <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      out_good  <= 1'b0;
      ev_good   <= 1'b0;
      ev_bad    <= 1'b0;
      unique case (state)
        D_HUNT:
          if (is_sync) state <= D_SFD;
        D_SFD:
          if (is_sfd && sfd_len != 0 && 32'(sfd_len) <= MAX_LEN) begin
            out_len    <= sfd_len;
            crc        <= crc32_word(CRC_INIT, rx_data);
            words_left <= (sfd_len + 16'd3) >> 2;
            pend_v     <= 1'b0;
            state      <= D_PAY;
          end else if (!is_sync) begin
            state <= D_HUNT;
          end
        D_PAY:
          if (is_dat) begin
            crc        <= crc32_word(crc, rx_data);
            words_left <= words_left - 1'b1;
            pend_v     <= 1'b1;
            pend_d     <= byte_swap(rx_data);
            pend_sof   <= !pend_v;
            if (pend_v) begin
              out_valid <= 1'b1;
              out_data  <= pend_d;
              out_sof   <= pend_sof;
            end
            if (words_left == 1) state <= D_CHK;
          end else begin
            // path broken inside the frame: end it as bad and resync
            if (pend_v) begin
              out_valid <= 1'b1;
              out_data  <= pend_d;
              out_sof   <= pend_sof;
              out_eof   <= 1'b1;
              out_good  <= 1'b0;
            end
            pend_v <= 1'b0;
            ev_bad <= 1'b1;
            state  <= is_sync ? D_SFD : D_HUNT;
          end
        D_CHK: begin
          out_valid <= 1'b1;
          out_data  <= pend_d;
          out_sof   <= pend_sof;
          out_eof   <= 1'b1;
          out_good  <= is_dat && (rx_data == ~crc);
          ev_good   <= is_dat && (rx_data == ~crc);
          ev_bad    <= !(is_dat && (rx_data == ~crc));
          pend_v    <= 1'b0;
          state     <= is_sync ? D_SFD : D_HUNT;
        end
        default: state <= D_HUNT;
      endcase
    end
  end
endmodule
