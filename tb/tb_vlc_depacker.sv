// Testbench for vlc_depacker: builds VLC frames with an independent CRC
// model and feeds them with K28.5 idle between them. Cases: good frames
// of many lengths; frames with a flipped payload bit (bad CRC); frames
// cut in the middle by a light-path interruption (code errors and noise
// for a while); noise words that imitate a sync word; and good frames
// after each disturbance, which must come through again (self-recovery).
// Checks every word, sof/eof, length and verdict of each output frame.
module tb_vlc_depacker;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] rxd = 32'hBCBC_BCBC; logic [3:0] rxk = 4'b0001; logic rxe = 0;
  logic ov, osof, oeof, ogood, evg, evb; logic [31:0] od; logic [15:0] olen;
  int checks = 0, failures = 0;

  vlc_depacker dut (.clk, .rst_n, .rx_data(rxd), .rx_charisk(rxk), .rx_err(rxe),
    .out_valid(ov), .out_data(od), .out_sof(osof), .out_eof(oeof), .out_good(ogood),
    .out_len(olen), .ev_good(evg), .ev_bad(evb));

  always #4 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // expected output frames
  logic [31:0] exp_w [$][$]; bit exp_good [$]; int exp_len [$];
  logic [31:0] cur [$]; int n_good = 0, n_bad = 0, n_evg = 0, n_evb = 0;

  always @(posedge clk) if (rst_n) begin
    if (evg) n_evg++;
    if (evb) n_evb++;
    if (ov) begin
      if (osof) cur = {};
      cur.push_back(od);
      if (oeof) begin
        logic [31:0] e[$]; bit g; int l;
        e = exp_w.pop_front(); g = exp_good.pop_front(); l = exp_len.pop_front();
        checks++;
        if (ogood != g || olen != l) begin failures++; $display("FAIL verdict %b exp %b len %0d exp %0d", ogood, g, olen, l); end
        if (g) begin
          checks++;
          if (cur != e) begin failures++; $display("FAIL data of %0d-byte frame", l); end
          n_good++;
        end else n_bad++;
      end
    end
  end

  task automatic word(input logic [31:0] d, input logic [3:0] k, input logic e = 0);
    @(negedge clk); rxd = d; rxk = k; rxe = e;
  endtask
  task automatic idle(input int n);
    repeat (n) word(32'hBCBC_BCBC, 4'b0001);
  endtask

  // mode 0 good, 1 flipped bit, 2 cut after cut_at payload words
  task automatic frame(input int len, input int mode, input int cut_at = 0);
    byte unsigned f[$]; logic [31:0] c, sfd, e[$]; int nw;
    nw = (len + 3) / 4;
    for (int i = 0; i < nw * 4; i++) f.push_back(byte'($urandom));
    sfd = {8'hFF, 16'(len), 8'hFB};
    c = ref_crc32({8'hFB, len[7:0], len[15:8], 8'hFF, f});
    for (int w = 0; w < nw; w++) e.push_back({f[4*w], f[4*w+1], f[4*w+2], f[4*w+3]});
    exp_w.push_back(e); exp_good.push_back(mode == 0); exp_len.push_back(len);
    if (mode == 1) f[$urandom_range(0, len - 1)] ^= 8'h10;
    word(32'hFF00_01BC, 4'b0001);
    word(sfd, 4'b0001);
    for (int w = 0; w < nw; w++) begin
      if (mode == 2 && w == cut_at) begin
        // light path interrupted: code errors and noise
        repeat (20) word($urandom, 4'($urandom), 1'b1);
        return;
      end
      word({f[4*w+3], f[4*w+2], f[4*w+1], f[4*w]}, 4'b0000);
    end
    word(c, 4'b0000);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    idle(5);
    for (int n = 0; n < 20; n++) begin frame($urandom_range(1, 300), 0); idle($urandom_range(0, 3)); end
    frame(1518, 0); idle(2);
    frame(100, 1); idle(2);
    frame(64, 0); idle(2);
    frame(200, 2, 10); idle(4);
    frame(64, 0); idle(2);
    // back to back after a bad frame, no idle
    frame(80, 1); frame(90, 0);
    // a fake sync in noise followed by a non-delimiter
    word(32'hFF00_01BC, 4'b0001); word(32'h1234_5678, 4'b0000); idle(2);
    frame(1518, 2, 300); frame(64, 0); idle(3);
    repeat (10) begin frame($urandom_range(64, 1518), 0); idle(2); end
    idle(10);
    checks++; if (exp_w.size() != 0) begin failures++; $display("FAIL %0d frames not seen", exp_w.size()); end
    checks++; if (n_evg != n_good || n_evb != n_bad || n_bad != 4) begin
      failures++; $display("FAIL events g %0d/%0d b %0d/%0d", n_evg, n_good, n_evb, n_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
