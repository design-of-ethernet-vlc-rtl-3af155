// End-to-end testbench of eth_vlc_top at its default sizes.
//
// The transceiver's transmit word stream is looped back to its receive
// side (the light path, two words of delay), a PHY model drives RGMII
// frames into the design and collects what it sends back, and a PHY
// management model answers MDIO. The run:
//   1. waits for link_up (PHY reset and auto-negotiation over MDIO);
//   2. sends frames at a moderate rate, plus one with a bad FCS and one
//      runt: every good frame must come back, the broken ones never;
//   3. sends 120 maximum-size frames back to back at the full 1 Gbit/s:
//      the Ethernet-VLC buffer must pause at its upper threshold, frames
//      must be dropped at the 8-to-32 converter, and the frames that come
//      back must flow at about 500 Mbit/s (625 Mbit/s on the light path
//      less the 8B/10B overhead, minus VLC framing); then the same with
//      1200 minimum-size frames, which come back at about 364 Mbit/s
//      because the six words of framing and hand-over weigh more on a
//      16-word frame;
//   4. cuts the light path in the middle of traffic: broken VLC frames
//      must be marked and cleaned out of the VLC-Ethernet buffer;
//   5. sends frames at a moderate rate again: all must come back
//      (self-recovery).
// Every frame that comes back must be byte-exact and in order, preceded
// by a correct preamble, and gaps between frames must be at least 12
// clocks. Each mechanism is counted; one that never happened is a failure.
module tb_eth_vlc_top;
  import tb_util_pkg::*;
  import vlc_pkg::*;

  logic eth_clk = 0, vlc_clk = 0, rst_n = 0;
  always #4  eth_clk = ~eth_clk;   // 125 MHz
  always #32 vlc_clk = ~vlc_clk;   // 15.625 MHz: 32 bits x 10/8 = 625 Mbit/s

  logic [3:0] rgmii_rxd = 0, rgmii_txd; logic rgmii_rx_ctl = 0, rgmii_tx_ctl, rgmii_txc;
  logic mdc, mdio_o, mdio_oe, mdio_i, link_up, pdrive, pval;
  logic [31:0] tx_data, rx_data; logic [3:0] tx_charisk, rx_charisk; logic rx_err;
  eth_events_t eth_ev; vlc_events_t vlc_ev;

  eth_vlc_top dut (
    .eth_clk, .eth_rst_n(rst_n), .vlc_clk, .vlc_rst_n(rst_n),
    .rgmii_rxd, .rgmii_rx_ctl, .rgmii_txd, .rgmii_tx_ctl, .rgmii_txc,
    .mdc, .mdio_o, .mdio_oe, .mdio_i, .link_up,
    .tx_data, .tx_charisk, .rx_data, .rx_charisk, .rx_err, .eth_ev, .vlc_ev);

  assign mdio_i = mdio_oe ? mdio_o : (pdrive ? pval : 1'b1);
  phy_mdio_model #(.ADDR(5'd0)) phy (.mdc, .mdio_in(mdio_i), .drive(pdrive), .drive_val(pval),
                                     .force_link_down(1'b0));

  int checks = 0, failures = 0;
  initial begin repeat (3_000_000) @(posedge eth_clk); failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------- light path with cut ----------------
  bit cut = 0;
  logic [31:0] lp_d [2]; logic [3:0] lp_k [2];
  always @(posedge vlc_clk) begin
    lp_d[0] <= tx_data; lp_k[0] <= tx_charisk;
    lp_d[1] <= lp_d[0]; lp_k[1] <= lp_k[0];
  end
  assign rx_data    = cut ? 32'h5A5A_0F0F ^ lp_d[1] : lp_d[1];
  assign rx_charisk = cut ? 4'b0100 : lp_k[1];
  assign rx_err     = cut;

  // ---------------- RGMII receive driver ----------------
  logic [8:0] rx_q [$];          // {dv, byte} per clock
  always begin
    logic [8:0] e;
    @(negedge eth_clk);
    e = (rx_q.size() != 0) ? rx_q.pop_front() : 9'h0;
    #2 rgmii_rxd = e[3:0]; rgmii_rx_ctl = e[8];
    @(posedge eth_clk);
    #2 rgmii_rxd = e[7:4]; rgmii_rx_ctl = e[8];
  end

  // frames handed to the PHY model, in order, with a "must arrive" flag
  byte unsigned sent_b [$]; int sent_len [$]; bit sent_must [$];
  int n_sent = 0;

  task automatic put_frame(input byte unsigned f[$], input bit must_arrive, input bit good = 1);
    for (int i = 0; i < 7; i++) rx_q.push_back({1'b1, 8'h55});
    rx_q.push_back({1'b1, 8'hD5});
    foreach (f[i]) rx_q.push_back({1'b1, f[i]});
    for (int i = 0; i < 12; i++) rx_q.push_back(9'h0);
    if (good) begin
      sent_b = {sent_b, f}; sent_len.push_back(f.size()); sent_must.push_back(must_arrive);
    end
    n_sent++;
  endtask

  task automatic wait_q_empty();
    while (rx_q.size() != 0) @(posedge eth_clk);
  endtask

  // ---------------- RGMII transmit monitor ----------------
  byte unsigned cur [$];
  int n_rx = 0, idle = 100, n_gap_ok = 0;
  bit en_prev = 0;
  realtime t_rx [$]; int rx_bytes [$];
  logic [3:0] lo_n; logic lo_c;
  always @(posedge eth_clk) begin
    #1 lo_n = rgmii_txd; lo_c = rgmii_tx_ctl;
    @(negedge eth_clk);
    #1 begin
      logic [7:0] b; b = {rgmii_txd, lo_n};
      if (lo_c) begin
        if (!en_prev) begin
          checks++;
          if (idle < 12) begin failures++; $display("FAIL gap %0d clocks", idle); end
          else n_gap_ok++;
        end
        cur.push_back(b); idle = 0;
      end else begin
        if (en_prev) frame_done();
        idle++;
      end
      en_prev = lo_c;
    end
  end

  function automatic void frame_done();
    byte unsigned body[$]; bit found;
    checks++;
    if (cur.size() < 8 || cur[0:6] != '{8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55} || cur[7] != 8'hD5) begin
      failures++; $display("FAIL preamble");
    end
    body = cur;
    repeat (8) if (body.size() != 0) void'(body.pop_front());
    found = 0;
    while (sent_len.size() != 0 && !found) begin
      int l; bit m; byte unsigned e[$];
      l = sent_len.pop_front(); m = sent_must.pop_front();
      e = {};
      repeat (l) e.push_back(sent_b.pop_front());
      if (e == body) found = 1;
      else if (m) begin failures++; $display("FAIL frame that had to arrive is missing (%0d bytes)", l); end
    end
    checks++;
    if (!found) begin failures++; $display("FAIL frame out of %0d bytes not among those sent", body.size()); end
    n_rx++;
    t_rx.push_back($realtime); rx_bytes.push_back(body.size());
    cur = {};
  endfunction

  // ---------------- mechanism counters ----------------
  int c_rx_good = 0, c_rx_drop = 0, c_dl_pause = 0, c_vlc_bad = 0, c_ul_frag = 0,
      c_ul_flush = 0, c_vlc_tx = 0, c_vlc_good = 0, c_link = 0;
  bit pause_prev = 0, link_prev = 0;
  always @(posedge eth_clk) if (rst_n) begin
    if (eth_ev.rx_frame_good) c_rx_good++;
    if (eth_ev.rx_frame_drop) c_rx_drop++;
    if (eth_ev.dl_paused && !pause_prev) c_dl_pause++;
    pause_prev = eth_ev.dl_paused;
    if (eth_ev.ul_flush) c_ul_flush++;
    if (link_up && !link_prev) c_link++;
    link_prev = link_up;
  end
  always @(posedge vlc_clk) if (rst_n) begin
    if (vlc_ev.rx_frame_bad) c_vlc_bad++;
    if (vlc_ev.ul_fragment) c_ul_frag++;
    if (vlc_ev.tx_frame) c_vlc_tx++;
    if (vlc_ev.rx_frame_good) c_vlc_good++;
  end

  // Frame data rate of the frames that came back between two indices.
  task automatic check_rate(input int a, input int b, input real lo, input real hi);
    real bits, secs, mbps;
    bits = 0; for (int i = a + 1; i <= b; i++) bits += rx_bytes[i] * 8.0;
    secs = (t_rx[b] - t_rx[a]) * 1e-9;
    mbps = bits / secs / 1e6;
    $display("uplink rate during saturation: %0.1f Mbit/s", mbps);
    checks++; if (mbps < lo || mbps > hi) begin failures++; $display("FAIL rate %0.1f", mbps); end
  endtask
  int c_pause_big = 0;

  // ---------------- stimulus ----------------
  initial begin
    byte unsigned f[$];
    int burst_first, burst_last;
    repeat (5) @(posedge eth_clk); rst_n = 1;

    // 1. link bring-up
    wait (link_up);
    $display("[%0t] link up", $realtime);

    // 2. moderate rate, with a bad FCS frame and a runt
    for (int n = 0; n < 16; n++) begin
      make_eth_frame((n == 0) ? 64 : (n == 1) ? 1518 : $urandom_range(64, 1518), f);
      put_frame(f, 1);
      if (n == 5) begin make_eth_frame(200, f); f[100] ^= 8'h01; put_frame(f, 0, 0); end
      if (n == 9) begin make_eth_frame(60, f); put_frame(f, 0, 0); end
      wait_q_empty(); repeat (4000) @(posedge eth_clk);
    end
    repeat (20000) @(posedge eth_clk);
    checks++; if (sent_len.size() != 0) begin failures++; $display("FAIL phase 2: %0d frames outstanding", sent_len.size()); end
    $display("[%0t] phase 2 done: %0d frames back", $realtime, n_rx);

    // 3. saturation: 120 back-to-back maximum-size frames
    burst_first = n_rx;
    for (int n = 0; n < 120; n++) begin make_eth_frame(1518, f); put_frame(f, 0); end
    wait_q_empty();
    repeat (150000) @(posedge eth_clk);
    burst_last = n_rx;
    $display("[%0t] phase 3 done: %0d of 120 frames back", $realtime, burst_last - burst_first);
    checks++; if (burst_last - burst_first < 40) begin failures++; $display("FAIL too few burst frames"); end
    // 1518-byte frames: 380 payload words + sync, delimiter, check, two
    // idle words and one word for the buffer to hand over the next frame
    // = 386 words of 64 ns for 12144 bits: 491.6 Mbit/s.
    check_rate(burst_first + 5, burst_last - 5, 470.0, 500.0);
    c_pause_big = c_dl_pause;

    // 3b. saturation with minimum-size frames: 1200 back-to-back 64-byte
    // frames. 16 payload words + 6 = 22 words for 512 bits: 363.6 Mbit/s.
    burst_first = n_rx;
    for (int n = 0; n < 1200; n++) begin make_eth_frame(64, f); put_frame(f, 0); end
    wait_q_empty();
    repeat (150000) @(posedge eth_clk);
    burst_last = n_rx;
    $display("[%0t] phase 3b done: %0d of 1200 frames back", $realtime, burst_last - burst_first);
    checks++; if (burst_last - burst_first < 400) begin failures++; $display("FAIL too few small frames"); end
    check_rate(burst_first + 20, burst_last - 20, 350.0, 381.0);
    checks++; if (c_dl_pause == c_pause_big) begin failures++; $display("FAIL small frames never paused the buffer"); end

    // 4. cut the light path in the middle of traffic
    fork
      begin
        for (int n = 0; n < 30; n++) begin
          make_eth_frame($urandom_range(64, 1518), f); put_frame(f, 0);
          wait_q_empty(); repeat (1500) @(posedge eth_clk);
        end
      end
      begin
        repeat (20000) @(posedge eth_clk);
        @(posedge vlc_clk); cut = 1;
        repeat (200) @(posedge vlc_clk);
        cut = 0;
        repeat (1500) @(posedge vlc_clk);
        @(posedge vlc_clk); cut = 1;
        repeat (37) @(posedge vlc_clk);
        cut = 0;
      end
    join
    repeat (40000) @(posedge eth_clk);
    $display("[%0t] phase 4 done", $realtime);

    // 5. recovery: all must come back
    for (int n = 0; n < 12; n++) begin
      make_eth_frame($urandom_range(64, 1518), f); put_frame(f, 1);
      wait_q_empty(); repeat (4000) @(posedge eth_clk);
    end
    repeat (20000) @(posedge eth_clk);
    checks++; if (sent_len.size() != 0) begin failures++; $display("FAIL phase 5: %0d frames outstanding", sent_len.size()); end

    $display("sent %0d, back %0d | link-ups %0d, eth good %0d, eth drops %0d, dl pauses %0d, vlc tx %0d, vlc good %0d, vlc bad %0d, fragments %0d, flushes %0d, gaps ok %0d",
             n_sent, n_rx, c_link, c_rx_good, c_rx_drop, c_dl_pause, c_vlc_tx, c_vlc_good, c_vlc_bad, c_ul_frag, c_ul_flush, n_gap_ok);
    checks++; if (c_link != 1)      begin failures++; $display("FAIL link bring-up not seen"); end
    checks++; if (c_rx_drop < 3)    begin failures++; $display("FAIL Ethernet drops (bad FCS, runt, overflow) not seen"); end
    checks++; if (c_dl_pause == 0)  begin failures++; $display("FAIL buffer pause never happened"); end
    checks++; if (c_vlc_bad == 0)   begin failures++; $display("FAIL no VLC frame marked bad"); end
    checks++; if (c_ul_frag == 0 || c_ul_flush != c_ul_frag) begin failures++; $display("FAIL fragment cleaning"); end
    checks++; if (n_gap_ok == 0)    begin failures++; $display("FAIL no gap measured"); end
    // A frame whose sync word falls inside a cut is never seen by the
    // receiver at all, so up to a few frames may vanish without a verdict.
    checks++; if (c_vlc_good + c_vlc_bad > c_vlc_tx || c_vlc_good + c_vlc_bad + 4 < c_vlc_tx)
      begin failures++; $display("FAIL VLC verdict count does not match frames sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
