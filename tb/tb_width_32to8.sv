// Testbench for width_32to8: writes frames as 32-bit words (first byte in
// bits 31:24), some marked bad, and reads them out through a transmitter
// model that, like eth_tx, offers a start only while idle. Checks that
// only good frames come out, byte for byte with their exact lengths and
// with no gap inside a frame, that the first byte follows the length-FIFO
// pop by three clocks, and that in_allow falls when less than a full-size frame
// of room is left.
module tb_width_32to8;
  logic clk = 0, rst_n = 0;
  logic iv = 0, isof = 0, ieof = 0, igood = 0, start = 0;
  logic [31:0] id = 0; logic [10:0] ilen = 0;
  logic allow, ov, fok, fdrop; logic [7:0] od;
  int checks = 0, failures = 0;

  width_32to8 dut (.clk, .rst_n, .in_allow(allow), .in_valid(iv), .in_data(id), .in_sof(isof),
                   .in_eof(ieof), .in_good(igood), .in_len(ilen), .out_start(start),
                   .out_valid(ov), .out_data(od), .frame_ok(fok), .frame_drop(fdrop));

  always #4 clk = ~clk;
  initial begin repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  byte unsigned exp_q[$][$];
  byte unsigned cur[$];
  int n_out = 0, cyc = 0, start_cyc = 0, quiet = 0;
  bit tx_busy = 0, tx_en = 0, prev_ov = 0;

  // transmitter model: start offered while idle; busy from first byte
  always @(posedge clk) begin
    cyc++;
    if (ov && !prev_ov) begin
      checks++;
      if (cyc != start_cyc + 3) begin failures++; $display("FAIL first byte %0d clocks after start", cyc - start_cyc); end
    end
    if (ov) cur.push_back(od);
    if (!ov && prev_ov) begin
      byte unsigned e[$];
      e = exp_q.pop_front();
      checks++;
      if (cur != e) begin failures++; $display("FAIL frame %0d (%0d vs %0d bytes)", n_out, cur.size(), e.size()); end
      cur = {}; n_out++; tx_busy = 0; quiet = 0;
    end
    if (ov) tx_busy = 1;
    if (!tx_busy && !ov) quiet++;
    prev_ov = ov;
  end
  always @(negedge clk) start <= tx_en && !tx_busy && quiet > 3;
  always @(posedge clk) if (dut.lf_rd) start_cyc = cyc + 1;

  task automatic write_frame(input byte unsigned f[$], input bit good);
    int nw; nw = (f.size() + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      logic [31:0] word;
      for (int b = 0; b < 4; b++) word[31 - 8*b -: 8] = (4*w + b < f.size()) ? f[4*w + b] : 8'hEE;
      @(negedge clk); iv = 1; id = word; isof = (w == 0); ieof = (w == nw - 1);
      ilen = 11'(f.size()); igood = good;
    end
    @(negedge clk); iv = 0; isof = 0; ieof = 0;
  endtask

  function automatic void rnd(input int len, output byte unsigned f[$]);
    f = {};
    for (int i = 0; i < len; i++) f.push_back(byte'($urandom));
  endfunction

  initial begin
    byte unsigned f[$];
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (!allow) begin failures++; $display("FAIL not allowed when empty"); end
    // with the reader stopped, one 1518-byte frame leaves 528 bytes: no more allow
    rnd(1518, f); exp_q.push_back(f); write_frame(f, 1);
    @(negedge clk);
    checks++; if (allow) begin failures++; $display("FAIL allow with 528 bytes free"); end
    tx_en = 1;
    for (int n = 0; n < 40; n++) begin
      bit g; g = ($urandom_range(0, 4) != 0);
      rnd($urandom_range(60, 400), f);
      while (!allow) @(negedge clk);
      if (g) exp_q.push_back(f);
      write_frame(f, g);
    end
    repeat (5000) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d frames missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
