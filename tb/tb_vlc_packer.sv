// Testbench for vlc_packer: a source shaped like the buffer read side
// offers frames when in_allow is high and holds each word until in_ready.
// The monitor checks the transmitted stream word by word: idle words
// 0xbcbcbcbc with charisk 0001, at least GAP_WORDS idle words between
// frames, the sync word 0xff0001bc, the delimiter (a 64-byte frame must give 0xff0040fb),
// the payload with the first byte moved to lane 0, one word per clock,
// and the CRC word computed by an independent CRC model.
module tb_vlc_packer;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic allow, ready, iv = 0, isof = 0, ieof = 0, evf;
  logic [31:0] id = 0, txd; logic [3:0] txk; logic [15:0] ilen = 0;
  int checks = 0, failures = 0;

  vlc_packer #(.GAP_WORDS(2)) dut (.clk, .rst_n, .in_allow(allow), .in_ready(ready), .in_valid(iv),
    .in_data(id), .in_sof(isof), .in_eof(ieof), .in_len(ilen), .tx_data(txd), .tx_charisk(txk),
    .ev_frame(evf));

  always #4 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // expected stream per frame: words + charisk
  logic [31:0] exp_w [$][$]; logic [3:0] exp_k [$][$];
  int idle_run = 100, n_frames = 0, pos = -1, n_ev = 0;
  logic [31:0] cw [$]; logic [3:0] ck [$];

  always @(posedge clk) if (rst_n) begin
    if (evf) n_ev++;
    if (pos < 0) begin
      if (txd == 32'hBCBC_BCBC) begin
        checks++;
        if (txk != 4'b0001) begin failures++; $display("FAIL idle charisk %b", txk); end
        idle_run++;
      end else begin
        checks++;
        if (idle_run < 2) begin failures++; $display("FAIL gap %0d", idle_run); end
        cw = exp_w.pop_front(); ck = exp_k.pop_front(); pos = 0;
      end
    end
    if (pos >= 0) begin
      checks++;
      if (txd != cw[pos] || txk != ck[pos]) begin
        failures++; $display("FAIL frame %0d word %0d: %h/%b exp %h/%b", n_frames, pos, txd, txk, cw[pos], ck[pos]);
      end
      pos++;
      if (pos == cw.size()) begin pos = -1; idle_run = 0; n_frames++; end
    end
  end

  task automatic send(input int len);
    byte unsigned f[$], crcb[$];
    logic [31:0] words[$], ew[$]; logic [3:0] ek[$];
    int nw; logic [31:0] c, sfd;
    nw = (len + 3) / 4;
    for (int i = 0; i < nw * 4; i++) f.push_back(byte'($urandom));
    for (int w = 0; w < nw; w++) words.push_back({f[4*w], f[4*w+1], f[4*w+2], f[4*w+3]});
    crcb = {8'hFB, len[7:0], len[15:8], 8'hFF, f};
    c = ref_crc32(crcb);
    sfd = {8'hFF, 16'(len), 8'hFB};
    ew = {32'hFF00_01BC, sfd}; ek = {4'b0001, 4'b0001};
    for (int w = 0; w < nw; w++) begin
      ew.push_back({f[4*w+3], f[4*w+2], f[4*w+1], f[4*w]}); ek.push_back(4'b0000);
    end
    ew.push_back(c); ek.push_back(4'b0000);
    if (len == 64) begin
      checks++; if (ew[1] != 32'hFF00_40FB) begin failures++; $display("FAIL model sfd"); end
    end
    exp_w.push_back(ew); exp_k.push_back(ek);
    @(negedge clk);
    while (!allow) @(negedge clk);
    for (int w = 0; w < nw; w++) begin
      // the word is taken at the next rising edge if in_ready is high now
      iv = 1; id = words[w]; isof = (w == 0); ieof = (w == nw - 1); ilen = 16'(len);
      while (!ready) @(negedge clk);
      @(negedge clk);
    end
    iv = 0; isof = 0; ieof = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    send(64);
    for (int n = 0; n < 30; n++) send($urandom_range(1, 300));
    send(1518);
    repeat (30) @(negedge clk);
    checks++; if (n_frames != 32 || n_ev != 32) begin failures++; $display("FAIL frames %0d ev %0d", n_frames, n_ev); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
