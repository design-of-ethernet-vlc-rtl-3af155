// Ethernet-VLC data conversion system: Gigabit Ethernet (RGMII PHY) on one
// side, a 625 Mbit/s visible-light link through an FPGA serial transceiver
// on the other.
//
// Downlink (Ethernet to light):
//   rgmii_rs -> eth_rx (strip preamble, check FCS) -> width_8to32 (drop bad
//   frames, pack bytes into words) -> frame_buffer (Ethernet clock to
//   transceiver clock, threshold pause) -> vlc_packer -> tx_data/charisk.
// Uplink (light to Ethernet):
//   rx_data/charisk -> vlc_depacker (find frames, check CRC, mark bad ones)
//   -> frame_buffer (transceiver clock to Ethernet clock, masks bad frames
//   by fragment cleaning) -> width_32to8 -> eth_tx (preamble, 96 ns gap)
//   -> rgmii_rs.
// mdio_smi resets the PHY and waits for auto-negotiation; its link_up
// enables eth_rx and eth_tx.
//
// Clocks: eth_clk is the 125 MHz Ethernet clock (8 ns per byte);
// vlc_clk is the transceiver's 32-bit user clock, 15.625 MHz for 625
// Mbit/s after 8B/10B coding (40 line bits per word). The transceiver
// itself (8B/10B coder, serialiser, clock recovery and comma alignment)
// is outside this module: its parallel ports are brought out here, with
// the receive side assumed to be on vlc_clk after the transceiver's
// elastic buffer. Each reset is asynchronous, active low, and both must
// be asserted together. The event outputs are one-clock pulses for
// monitoring, in the clock domain named in their struct.
module eth_vlc_top
  import vlc_pkg::*;
#(
  parameter int unsigned MDC_DIV = 25
) (
  input  logic        eth_clk,
  input  logic        eth_rst_n,
  input  logic        vlc_clk,
  input  logic        vlc_rst_n,
  // RGMII to the Ethernet PHY
  input  logic [3:0]  rgmii_rxd,
  input  logic        rgmii_rx_ctl,
  output logic [3:0]  rgmii_txd,
  output logic        rgmii_tx_ctl,
  output logic        rgmii_txc,
  // PHY management
  output logic        mdc,
  output logic        mdio_o,
  output logic        mdio_oe,
  input  logic        mdio_i,
  output logic        link_up,
  // transceiver parallel ports
  output logic [31:0] tx_data,
  output logic [3:0]  tx_charisk,
  input  logic [31:0] rx_data,
  input  logic [3:0]  rx_charisk,
  input  logic        rx_err,
  // monitoring
  output eth_events_t eth_ev,
  output vlc_events_t vlc_ev
);
  // ---------------- Ethernet interface ----------------
  logic [7:0]  g_rxd, g_txd;
  logic        g_rx_dv, g_rx_er, g_tx_en, g_tx_er;
  logic [15:0] smi_rdata;

  rgmii_rs u_rs (
    .clk(eth_clk), .rst_n(eth_rst_n),
    .rgmii_rxd, .rgmii_rx_ctl, .rgmii_txd, .rgmii_tx_ctl, .rgmii_txc,
    .gmii_rxd(g_rxd), .gmii_rx_dv(g_rx_dv), .gmii_rx_er(g_rx_er),
    .gmii_txd(g_txd), .gmii_tx_en(g_tx_en), .gmii_tx_er(g_tx_er)
  );

  mdio_smi #(.MDC_DIV(MDC_DIV)) u_smi (
    .clk(eth_clk), .rst_n(eth_rst_n), .mdc, .mdio_o, .mdio_oe, .mdio_i,
    .link_up, .last_rdata(smi_rdata)
  );

  // ---------------- downlink ----------------
  logic        rx_valid, rx_end, rx_good;
  logic [7:0]  rx_byte;
  logic [15:0] rx_len;

  eth_rx u_eth_rx (
    .clk(eth_clk), .rst_n(eth_rst_n), .en(link_up),
    .gmii_rxd(g_rxd), .gmii_rx_dv(g_rx_dv), .gmii_rx_er(g_rx_er),
    .out_valid(rx_valid), .out_data(rx_byte), .out_end(rx_end),
    .out_good(rx_good), .out_len(rx_len)
  );

  logic        w_valid, w_sof, w_eof, dl_allow;
  logic [31:0] w_data;
  logic [10:0] w_len;
  logic        c8_ok, c8_drop;

  width_8to32 u_c8to32 (
    .clk(eth_clk), .rst_n(eth_rst_n),
    .in_valid(rx_valid), .in_data(rx_byte), .in_end(rx_end), .in_good(rx_good),
    .out_allow(dl_allow), .out_valid(w_valid), .out_data(w_data),
    .out_sof(w_sof), .out_eof(w_eof), .out_len(w_len),
    .frame_ok(c8_ok), .frame_drop(c8_drop)
  );

  logic        dlb_valid, dlb_sof, dlb_eof, pk_allow, pk_ready;
  logic [31:0] dlb_data;
  logic [15:0] dlb_len;
  logic [13:0] dl_count;
  logic        dl_paused, dl_in, dl_drop, dl_frag, dl_flush;

  frame_buffer #(
    .D_AW(13), .I_AW(9), .D_UPPER(7811), .D_LOWER(3715)
  ) u_dl_buf (
    .wclk(eth_clk), .wrst_n(eth_rst_n),
    .in_valid(w_valid), .in_data(w_data), .in_sof(w_sof), .in_eof(w_eof),
    .in_good(1'b1), .in_len({5'd0, w_len}),
    .wr_allow(dl_allow), .wr_paused(dl_paused), .dfifo_data_count(dl_count),
    .ev_frame_in(dl_in), .ev_frame_drop(dl_drop), .ev_fragment(dl_frag),
    .rclk(vlc_clk), .rrst_n(vlc_rst_n),
    .out_allow(pk_allow), .out_ready(pk_ready),
    .out_valid(dlb_valid), .out_data(dlb_data), .out_sof(dlb_sof),
    .out_eof(dlb_eof), .out_len(dlb_len), .ev_flush(dl_flush)
  );

  logic pk_frame;
  vlc_packer u_packer (
    .clk(vlc_clk), .rst_n(vlc_rst_n),
    .in_allow(pk_allow), .in_ready(pk_ready), .in_valid(dlb_valid),
    .in_data(dlb_data), .in_sof(dlb_sof), .in_eof(dlb_eof), .in_len(dlb_len),
    .tx_data, .tx_charisk, .ev_frame(pk_frame)
  );

  // ---------------- uplink ----------------
  logic        dp_valid, dp_sof, dp_eof, dp_good, dp_evg, dp_evb;
  logic [31:0] dp_data;
  logic [15:0] dp_len;

  vlc_depacker u_depacker (
    .clk(vlc_clk), .rst_n(vlc_rst_n),
    .rx_data, .rx_charisk, .rx_err,
    .out_valid(dp_valid), .out_data(dp_data), .out_sof(dp_sof),
    .out_eof(dp_eof), .out_good(dp_good), .out_len(dp_len),
    .ev_good(dp_evg), .ev_bad(dp_evb)
  );

  logic        ulb_valid, ulb_sof, ulb_eof, c32_allow;
  logic [31:0] ulb_data;
  logic [15:0] ulb_len;
  logic [10:0] ul_count;
  logic        ul_allow, ul_paused, ul_in, ul_drop, ul_frag, ul_flush;

  frame_buffer #(
    .D_AW(10), .I_AW(9),
    .D_UPPER(1024), .D_LOWER(1025),   // no DFIFO threshold on the uplink
    .I_UPPER(495), .I_LOWER(8)        // 511 - 8*2, and 8
  ) u_ul_buf (
    .wclk(vlc_clk), .wrst_n(vlc_rst_n),
    .in_valid(dp_valid), .in_data(dp_data), .in_sof(dp_sof), .in_eof(dp_eof),
    .in_good(dp_good), .in_len(dp_len),
    .wr_allow(ul_allow), .wr_paused(ul_paused), .dfifo_data_count(ul_count),
    .ev_frame_in(ul_in), .ev_frame_drop(ul_drop), .ev_fragment(ul_frag),
    .rclk(eth_clk), .rrst_n(eth_rst_n),
    .out_allow(c32_allow), .out_ready(1'b1),
    .out_valid(ulb_valid), .out_data(ulb_data), .out_sof(ulb_sof),
    .out_eof(ulb_eof), .out_len(ulb_len), .ev_flush(ul_flush)
  );

  logic       tx_ready, tb_valid, c32_ok, c32_drop;
  logic [7:0] tb_byte;

  width_32to8 u_c32to8 (
    .clk(eth_clk), .rst_n(eth_rst_n),
    .in_allow(c32_allow), .in_valid(ulb_valid), .in_data(ulb_data),
    .in_sof(ulb_sof), .in_eof(ulb_eof), .in_good(1'b1), .in_len(ulb_len[10:0]),
    .out_start(tx_ready), .out_valid(tb_valid), .out_data(tb_byte),
    .frame_ok(c32_ok), .frame_drop(c32_drop)
  );

  eth_tx u_eth_tx (
    .clk(eth_clk), .rst_n(eth_rst_n), .en(link_up),
    .in_valid(tb_valid), .in_data(tb_byte), .ready(tx_ready),
    .gmii_txd(g_txd), .gmii_tx_en(g_tx_en), .gmii_tx_er(g_tx_er)
  );

  // ---------------- monitoring ----------------
  always_comb begin
    eth_ev.rx_frame_good  = c8_ok;
    eth_ev.rx_frame_drop  = c8_drop;
    eth_ev.dl_frame_in    = dl_in;
    eth_ev.dl_frame_drop  = dl_drop;
    eth_ev.dl_fragment    = dl_frag;
    eth_ev.dl_paused      = dl_paused;
    eth_ev.ul_flush       = ul_flush;
    eth_ev.tx_frame       = c32_ok;
    eth_ev.tx_frame_drop  = c32_drop;
    vlc_ev.tx_frame       = pk_frame;
    vlc_ev.rx_frame_good  = dp_evg;
    vlc_ev.rx_frame_bad   = dp_evb;
    vlc_ev.ul_frame_in    = ul_in;
    vlc_ev.ul_frame_drop  = ul_drop;
    vlc_ev.ul_fragment    = ul_frag;
    vlc_ev.ul_paused      = ul_paused;
    vlc_ev.dl_flush       = dl_flush;
  end
endmodule
