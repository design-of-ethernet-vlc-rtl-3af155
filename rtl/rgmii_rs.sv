// RGMII reconciliation sublayer: converts between the PHY's RGMII pins
// (4 data bits on both clock edges) and the 8-bit GMII-style byte stream
// used by the Ethernet RX/TX logic.
//
// Receive: the low nibble and RX_CTL (= RX_DV) are sampled on the rising
// edge, the high nibble and RX_CTL (= RX_DV xor RX_ER) on the falling
// edge; the assembled byte appears on gmii_rxd one rising edge later.
// Transmit: gmii_txd/gmii_tx_en/gmii_tx_er are registered on the rising
// edge; the low nibble with TX_EN drives the pins while clk is high and
// the high nibble with TX_EN xor TX_ER while clk is low (an output DDR
// register in an FPGA). rgmii_txc is the forwarded clock.
// The receive side runs on clk as well: the PHY's receive clock is taken
// to be the same 125 MHz clock, skew-aligned (this design's choice; the
// document only names an RGMII reconciliation sublayer).
module rgmii_rs (
  input  logic       clk,
  input  logic       rst_n,
  // RGMII pins
  input  logic [3:0] rgmii_rxd,
  input  logic       rgmii_rx_ctl,
  output logic [3:0] rgmii_txd,
  output logic       rgmii_tx_ctl,
  output logic       rgmii_txc,
  // GMII side
  output logic [7:0] gmii_rxd,
  output logic       gmii_rx_dv,
  output logic       gmii_rx_er,
  input  logic [7:0] gmii_txd,
  input  logic       gmii_tx_en,
  input  logic       gmii_tx_er
);
  logic [3:0] rx_lo, rx_hi;
  logic       ctl_r, ctl_f;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rx_lo <= '0; ctl_r <= 1'b0;
    end else begin
      rx_lo <= rgmii_rxd; ctl_r <= rgmii_rx_ctl;
    end

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) begin
      rx_hi <= '0; ctl_f <= 1'b0;
    end else begin
      rx_hi <= rgmii_rxd; ctl_f <= rgmii_rx_ctl;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      gmii_rxd <= '0; gmii_rx_dv <= 1'b0; gmii_rx_er <= 1'b0;
    end else begin
      gmii_rxd   <= {rx_hi, rx_lo};
      gmii_rx_dv <= ctl_r;
      gmii_rx_er <= ctl_r ^ ctl_f;
    end

  logic [7:0] txd_q;
  logic       txen_q, txer_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      txd_q <= '0; txen_q <= 1'b0; txer_q <= 1'b0;
    end else begin
      txd_q <= gmii_txd; txen_q <= gmii_tx_en; txer_q <= gmii_tx_er;
    end

  assign rgmii_txd    = clk ? txd_q[3:0] : txd_q[7:4];
  assign rgmii_tx_ctl = clk ? txen_q : (txen_q ^ txer_q);
  assign rgmii_txc    = clk;
endmodule
