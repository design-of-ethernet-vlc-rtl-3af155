// Ethernet transmit logic: re-framing and inter-frame gap.
//
// Takes a frame as an unbroken burst of bytes (in_valid high for every
// byte, destination address through FCS) and sends it on GMII preceded by
// seven preamble bytes 0x55 and the delimiter 0xD5. The bytes pass through
// an eight-stage delay line while the preamble goes out, so the source
// never has to stall. ready tells the source it may start the next frame:
// it is high only while the transmitter is idle, en is high and TX_EN has
// been low for IFG_CLKS clocks (12 clocks of 8 ns = the 96 ns minimum gap
// of Gigabit Ethernet, as the document specifies). Outputs are registered;
// the first preamble byte appears one clock after the first input byte.
// The FCS is passed through unchanged. With CRC_CHECK set, the optional
// transmit-side CRC check the document shows is done on the way through:
// a frame whose FCS does not match goes out with TX_ER high on its last
// byte, so the PHY sends it as an invalid frame. The check is optional in
// the document; enabling it by default is this design's choice.
module eth_tx
  import vlc_pkg::*;
#(
  parameter int unsigned IFG_CLKS  = ETH_IFG_CLKS,
  parameter bit          CRC_CHECK = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       ready,
  output logic [7:0] gmii_txd,
  output logic       gmii_tx_en,
  output logic       gmii_tx_er
);
  logic [7:0] dly_d [8];
  logic [7:0] dly_v;
  logic       busy;
  logic [3:0] pre_cnt;
  logic [4:0] ifg_cnt;
  logic [7:0] dly_e;          // error mark travelling with each byte
  logic [31:0] crc;
  logic       in_prev;
  logic       fcs_bad;

  // Optional FCS check: the CRC runs over the bytes as they enter; the
  // clock after the last byte the residue is known while that byte is
  // still in the first stage of the delay line.
  assign fcs_bad = CRC_CHECK && in_prev && !in_valid && (crc != CRC_RESIDUE);
  assign ready      = en && !busy && (ifg_cnt >= 5'(IFG_CLKS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly_v      <= '0;
      busy       <= 1'b0;
      pre_cnt    <= '0;
      ifg_cnt    <= 5'(IFG_CLKS);
      gmii_txd   <= '0;
      gmii_tx_en <= 1'b0;
      gmii_tx_er <= 1'b0;
      dly_e      <= '0;
      crc        <= CRC_INIT;
      in_prev    <= 1'b0;
      for (int i = 0; i < 8; i++) dly_d[i] <= '0;
    end else begin
      in_prev  <= in_valid;
      if (in_valid) crc <= crc32_byte(in_prev ? crc : CRC_INIT, in_data);
      dly_e    <= {dly_e[6:1], dly_e[0] | fcs_bad, 1'b0};
      dly_v    <= {dly_v[6:0], in_valid};
      dly_d[0] <= in_data;
      for (int i = 1; i < 8; i++) dly_d[i] <= dly_d[i-1];

      if (!busy) begin
        if (in_valid) begin
          busy       <= 1'b1;
          pre_cnt    <= 4'd1;
          gmii_tx_en <= 1'b1;
          gmii_tx_er <= 1'b0;
          gmii_txd   <= ETH_PREAMBLE;
        end else begin
          gmii_tx_en <= 1'b0;
          gmii_tx_er <= 1'b0;
          if (ifg_cnt != 5'h1F) ifg_cnt <= ifg_cnt + 1'b1;
        end
      end else if (pre_cnt != 4'd8) begin
        gmii_tx_en <= 1'b1;
        gmii_txd   <= (pre_cnt == 4'd7) ? ETH_SFD : ETH_PREAMBLE;
        pre_cnt    <= pre_cnt + 1'b1;
      end else begin
        gmii_tx_en <= dly_v[7];
        gmii_tx_er <= dly_v[7] && dly_e[7];
        gmii_txd   <= dly_d[7];
        if (!dly_v[7]) begin
          busy    <= 1'b0;
          ifg_cnt <= 5'd1;
        end
      end
    end
  end

  // A frame may only be started when ready was offered.
  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (!busy && in_valid) |-> (ifg_cnt >= 5'(IFG_CLKS)));
endmodule
