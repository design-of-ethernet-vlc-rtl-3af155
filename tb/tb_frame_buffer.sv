// Testbench for frame_buffer at reduced depths (DFIFO 64 words, IFIFO 8),
// write clock 8 ns, read clock 20 ns.
// Part 1, downlink style: the source waits for wr_allow, the sink stalls
// at random; every frame must arrive intact and in order, the DFIFO-count
// pause must engage above D_UPPER and release below D_LOWER.
// Part 2, uplink style: the source ignores wr_allow and marks some frames
// bad; bad frames must never come out (fragment cleaning), output frames
// must be an in-order subsequence of the good ones, and frames sent while
// the buffer accepts and is lightly loaded must all arrive.
// Part 3 uses a second instance with the IFIFO-count thresholds (as in
// the uplink buffer): with the sink blocked, writing pauses once the IFIFO
// holds more than I_UPPER entries and resumes below I_LOWER.
module tb_frame_buffer;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic iv = 0, isof = 0, ieof = 0, igood = 0; logic [31:0] id = 0; logic [15:0] ilen = 0;
  logic allow, paused, ev_in, ev_drop, ev_frag, ev_flush;
  logic [6:0] dcount;
  logic oallow = 0, oready = 0, ov, osof, oeof; logic [31:0] od; logic [15:0] olen;
  int checks = 0, failures = 0;

  frame_buffer #(.D_AW(6), .I_AW(3), .D_UPPER(40), .D_LOWER(20), .I_UPPER(8), .I_LOWER(9)) dut (
    .wclk, .wrst_n(rst_n), .in_valid(iv), .in_data(id), .in_sof(isof), .in_eof(ieof),
    .in_good(igood), .in_len(ilen), .wr_allow(allow), .wr_paused(paused),
    .dfifo_data_count(dcount), .ev_frame_in(ev_in), .ev_frame_drop(ev_drop), .ev_fragment(ev_frag),
    .rclk, .rrst_n(rst_n), .out_allow(oallow), .out_ready(oready), .out_valid(ov),
    .out_data(od), .out_sof(osof), .out_eof(oeof), .out_len(olen), .ev_flush(ev_flush));

  always #4 wclk = ~wclk;
  always #10 rclk = ~rclk;
  initial begin repeat (400000) @(posedge wclk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------- sink / checker ----------------
  logic [31:0] sent_w [$]; int sent_len [$]; bit must [$];   // words of all frames, flattened
  logic [31:0] cur [$]; int cur_len, n_rx = 0, n_flush = 0, n_pause = 0, n_frag = 0, n_drop = 0;
  bit prev_paused = 0;

  always @(posedge wclk) begin
    if (paused && !prev_paused) n_pause++;
    prev_paused = paused;
    if (ev_frag) n_frag++;
    if (ev_drop) n_drop++;
  end
  always @(posedge rclk) if (rst_n) begin
    if (ev_flush) n_flush++;
    if (ov && oready) begin
      if (osof) begin cur = {}; cur_len = olen; end
      cur.push_back(od);
      if (oeof) begin
        bit found;
        found = 0;
        // find the frame among those sent; earlier unmatched ones were lost
        while (sent_len.size() != 0 && !found) begin
          logic [31:0] e[$]; int l; bit m;
          l = sent_len.pop_front(); m = must.pop_front();
          e = {};
          repeat ((l + 3) / 4) e.push_back(sent_w.pop_front());
          if (e == cur && l == cur_len) found = 1;
          else if (m) begin failures++; $display("FAIL frame that had to arrive is lost"); end
        end
        checks++;
        if (!found) begin failures++; $display("FAIL unexpected frame (%0d words)", cur.size()); end
        n_rx++;
      end
    end
  end
  always @(negedge rclk) begin
    oready <= ($urandom_range(0, 3) != 0);
    oallow <= ($urandom_range(0, 1) != 0);
  end

  // ---------------- source ----------------
  task automatic frame(input int len, input bit good, input bit wait_allow, input bit expect_all);
    logic [31:0] w[$]; int nw; bit accepted;
    nw = (len + 3) / 4;
    for (int i = 0; i < nw; i++) w.push_back($urandom);
    @(negedge wclk);
    if (wait_allow) while (!allow) @(negedge wclk);
    accepted = allow;
    if (good) begin sent_w = {sent_w, w}; sent_len.push_back(len); must.push_back(expect_all && accepted); end
    for (int i = 0; i < nw; i++) begin
      iv = 1; id = w[i]; isof = (i == 0); ieof = (i == nw - 1); ilen = 16'(len); igood = good;
      @(negedge wclk);
    end
    iv = 0; isof = 0; ieof = 0;
  endtask

  // ---------------- second instance: IFIFO thresholds ----------------
  logic b_iv = 0, b_isof = 0, b_ieof = 0, b_oallow = 0;
  logic b_allow, b_paused, b_ov, b_osof, b_oeof, b_in, b_drop, b_frag, b_flush;
  logic [31:0] b_od; logic [15:0] b_olen; logic [6:0] b_dcount;
  frame_buffer #(.D_AW(6), .I_AW(3), .D_UPPER(64), .D_LOWER(65), .I_UPPER(5), .I_LOWER(2)) dut_i (
    .wclk, .wrst_n(rst_n), .in_valid(b_iv), .in_data(32'h0), .in_sof(b_isof), .in_eof(b_ieof),
    .in_good(1'b1), .in_len(16'd4), .wr_allow(b_allow), .wr_paused(b_paused),
    .dfifo_data_count(b_dcount), .ev_frame_in(b_in), .ev_frame_drop(b_drop), .ev_fragment(b_frag),
    .rclk, .rrst_n(rst_n), .out_allow(b_oallow), .out_ready(1'b1), .out_valid(b_ov),
    .out_data(b_od), .out_sof(b_osof), .out_eof(b_oeof), .out_len(b_olen), .ev_flush(b_flush));
  int b_stored = 0, b_dropped = 0, b_out = 0;
  always @(posedge wclk) begin if (b_in) b_stored++; if (b_drop) b_dropped++; end
  always @(posedge rclk) if (b_ov && b_oeof) b_out++;

  initial begin
    repeat (3) @(negedge wclk); rst_n = 1;
    // part 1: back-pressured source, all frames must arrive
    for (int n = 0; n < 60; n++) frame($urandom_range(4, 120), 1, 1, 1);
    repeat (3000) @(negedge wclk);
    checks++; if (sent_len.size() != 0) begin failures++; $display("FAIL part 1: %0d frames left", sent_len.size()); end
    checks++; if (n_pause == 0) begin failures++; $display("FAIL pause never engaged"); end
    checks++; if (paused) begin failures++; $display("FAIL pause not released"); end
    // part 2: source ignores allow; bad frames mixed in
    for (int n = 0; n < 80; n++) begin
      bit g; g = ($urandom_range(0, 3) != 0);
      frame($urandom_range(4, 60), g, 0, 0);
      if ($urandom_range(0, 1)) repeat ($urandom_range(20, 60)) @(negedge wclk);
    end
    // slow good frames at the end must all pass
    repeat (3000) @(negedge wclk);
    for (int n = 0; n < 10; n++) begin frame($urandom_range(4, 40), 1, 0, 1); repeat (200) @(negedge wclk); end
    repeat (3000) @(negedge wclk);
    checks++; if (sent_len.size() != 0) begin failures++; $display("FAIL part 2: %0d good frames unaccounted", sent_len.size()); end
    checks++; if (n_frag == 0 || n_flush != n_frag) begin failures++; $display("FAIL fragments %0d flushes %0d", n_frag, n_flush); end
    // part 3: IFIFO threshold instance with sink blocked
    for (int n = 0; n < 10; n++) begin
      @(negedge wclk); b_iv = 1; b_isof = 1; b_ieof = 1;
      @(negedge wclk); b_iv = 0; b_isof = 0; b_ieof = 0;
      repeat (15) @(negedge wclk);
    end
    checks++; if (!b_paused) begin failures++; $display("FAIL IFIFO pause not engaged"); end
    checks++; if (b_stored != 6 || b_dropped != 4) begin failures++; $display("FAIL stored %0d dropped %0d", b_stored, b_dropped); end
    b_oallow = 1;
    repeat (400) @(negedge wclk);
    checks++; if (b_paused || b_out != 6) begin failures++; $display("FAIL IFIFO pause release %b out %0d", b_paused, b_out); end
    $display("part1/2: received %0d, pauses %0d, drops %0d, fragments %0d, flushes %0d", n_rx, n_pause, n_drop, n_frag, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
