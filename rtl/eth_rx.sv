// Ethernet receive logic: frame delimiting and FCS check on the GMII byte
// stream.
//
// Waits for preamble bytes (0x55) followed by the start-of-frame delimiter
// (0xD5), then forwards every following byte (destination address through
// FCS) on out_valid/out_data, one cycle after it arrives. While the frame
// is received the CRC-32 is run over all bytes; when rx_dv falls, out_end
// pulses for one cycle (the cycle after the last out_valid) with out_good
// set if the CRC residue is correct, no rx_er was seen and the length is
// within 64..1518 bytes. out_len gives the byte count at that point.
// Frames only start while en is high (the link is up after
// auto-negotiation); a frame already started completes.
// Removing the header and checking the CRC follow the document; the
// length limits are the Ethernet ones it quotes; the rest is this
// design's choice.
module eth_rx
  import vlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [7:0]  gmii_rxd,
  input  logic        gmii_rx_dv,
  input  logic        gmii_rx_er,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_end,
  output logic        out_good,
  output logic [15:0] out_len
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA, S_DROP} state_t;
  state_t      state;
  logic [31:0] crc;
  logic        err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      crc       <= CRC_INIT;
      err       <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_end   <= 1'b0;
      out_good  <= 1'b0;
      out_len   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_end   <= 1'b0;
      unique case (state)
        S_IDLE:
          if (gmii_rx_dv && en)
            state <= (gmii_rxd == ETH_PREAMBLE) ? S_PRE : S_DROP;
        S_PRE:
          if (!gmii_rx_dv)                 state <= S_IDLE;
          else if (gmii_rxd == ETH_SFD) begin
            state   <= S_DATA;
            crc     <= CRC_INIT;
            err     <= 1'b0;
            out_len <= '0;
          end else if (gmii_rxd != ETH_PREAMBLE) state <= S_DROP;
        S_DATA:
          if (gmii_rx_dv) begin
            out_valid <= 1'b1;
            out_data  <= gmii_rxd;
            crc       <= crc32_byte(crc, gmii_rxd);
            if (gmii_rx_er) err <= 1'b1;
            if (out_len != 16'hFFFF) out_len <= out_len + 1'b1;
          end else begin
            out_end  <= 1'b1;
            out_good <= !err && (crc == CRC_RESIDUE) &&
                        (out_len >= 16'(ETH_MIN_LEN)) && (out_len <= 16'(ETH_MAX_LEN));
            state    <= S_IDLE;
          end
        S_DROP:
          if (!gmii_rx_dv) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
