// VLC frame packer (transmit half of the VLC transceiver logic).
//
// Wraps each frame read from the Ethernet-VLC buffer into the VLC frame and
// drives the transceiver's 32-bit parallel input, one word per clock:
//   sync word   0xff0001bc          charisk 0001 (K28.5 in lane 0)
//   delimiter   {0xff, len[15:0], 0xfb}  charisk 0001 (K27.7 in lane 0)
//   payload     ceil(len/4) words   charisk 0000
//   check       CRC-32, inverted    charisk 0000
//   interval    GAP_WORDS x 0xbcbcbcbc   charisk 0001 (K28.5 in lane 0),
//               also sent whenever idle
// len is the byte length of the frame. The CRC runs from the delimiter to
// the end of the payload. Payload words arrive with the first byte in bits
// 31:24 and are sent with it in bits 7:0, the lane the transceiver puts on
// the line first. in_allow is high when the packer can begin a frame; once
// it has seen in_sof it sends sync and delimiter and then takes one word
// per clock (in_ready) until in_eof. Frame layout, code words and CRC
// range follow the document; GAP_WORDS and the lane order are this
// design's choices.
module vlc_packer
  import vlc_pkg::*;
#(
  parameter int unsigned GAP_WORDS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        in_allow,
  output logic        in_ready,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  input  logic        in_sof,
  input  logic        in_eof,
  input  logic [15:0] in_len,
  output logic [31:0] tx_data,
  output logic [3:0]  tx_charisk,
  output logic        ev_frame      // pulse: a frame was sent
);
  typedef enum logic [2:0] {P_IDLE, P_SFD, P_PAY, P_CRC} pstate_t;
  pstate_t     state;
  logic [31:0] crc;
  logic [15:0] len_q;
  logic [7:0]  gap;

  assign in_allow = (state == P_IDLE) && (gap >= 8'(GAP_WORDS));
  assign in_ready = (state == P_PAY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE; crc <= CRC_INIT; len_q <= '0; gap <= 8'(GAP_WORDS);
      tx_data <= VLC_IDLE; tx_charisk <= VLC_IDLE_K; ev_frame <= 1'b0;
    end else begin
      ev_frame <= 1'b0;
      unique case (state)
        P_IDLE: begin
          if (in_valid && in_sof && gap >= 8'(GAP_WORDS)) begin
            tx_data    <= VLC_SYNC;
            tx_charisk <= VLC_SYNC_K;
            len_q      <= in_len;
            state      <= P_SFD;
          end else begin
            tx_data    <= VLC_IDLE;
            tx_charisk <= VLC_IDLE_K;
            if (gap != 8'hFF) gap <= gap + 1'b1;
          end
        end
        P_SFD: begin
          tx_data    <= {VLC_SFD_HI, len_q, VLC_SFD_LO};
          tx_charisk <= VLC_SFD_K;
          crc        <= crc32_word(CRC_INIT, {VLC_SFD_HI, len_q, VLC_SFD_LO});
          state      <= P_PAY;
        end
        P_PAY: begin
          if (in_valid) begin
            tx_data    <= byte_swap(in_data);
            tx_charisk <= 4'b0000;
            crc        <= crc32_word(crc, byte_swap(in_data));
            if (in_eof) state <= P_CRC;
          end else begin
            // not expected: the buffer stores whole frames before release
            tx_data    <= VLC_IDLE;
            tx_charisk <= VLC_IDLE_K;
          end
        end
        P_CRC: begin
          tx_data    <= ~crc;
          tx_charisk <= 4'b0000;
          ev_frame   <= 1'b1;
          gap        <= '0;
          state      <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule
