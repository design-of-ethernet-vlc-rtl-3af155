// Testbench for width_8to32: replays the document's 9-byte example
// (bytes 11..99 must come out as 0x11223344, 0x55667788, 0x99xxxxxx with
// length 9), then random good and bad frames, and a run with the read
// side blocked so that the 2048-byte RAM fills and a frame is dropped.
// Checks every word, every length, that only good frames come out, that
// words of a frame are back to back, and that the first word follows the
// length-FIFO pop by two clocks.
module tb_width_8to32;
  logic clk = 0, rst_n = 0;
  logic iv = 0, iend = 0, igood = 0, allow = 0;
  logic [7:0] id = 0;
  logic ov, osof, oeof, fok, fdrop; logic [31:0] od; logic [10:0] olen;
  int checks = 0, failures = 0;

  width_8to32 dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .in_end(iend), .in_good(igood),
                   .out_allow(allow), .out_valid(ov), .out_data(od), .out_sof(osof),
                   .out_eof(oeof), .out_len(olen), .frame_ok(fok), .frame_drop(fdrop));

  always #4 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  byte unsigned exp_q[$][$];
  int n_out = 0, n_ok = 0, n_drop = 0, cyc = 0, pop_cyc = -10;
  byte unsigned cur[$]; int cur_len; bit in_fr = 0; int last_cyc;

  always @(posedge clk) begin
    cyc++;
    if (fok) n_ok++;
    if (fdrop) n_drop++;
    if (dut.lf_rd) pop_cyc = cyc;
    if (ov) begin
      if (osof) begin
        checks++;
        if (cyc != pop_cyc + 2) begin failures++; $display("FAIL sof latency %0d", cyc - pop_cyc); end
        in_fr = 1; cur = {}; cur_len = olen;
      end else if (cyc != last_cyc + 1) begin
        failures++; $display("FAIL words not back to back");
      end
      last_cyc = cyc;
      for (int i = 3; i >= 0; i--) cur.push_back(od[8*i +: 8]);
      if (oeof) begin
        byte unsigned e[$];
        e = exp_q.pop_front();
        checks++;
        if (cur_len != e.size() || cur.size() != ((e.size() + 3) / 4) * 4 || cur[0:e.size()-1] != e) begin
          failures++; $display("FAIL frame %0d: len %0d exp %0d", n_out, cur_len, e.size());
        end
        n_out++; in_fr = 0;
      end
    end
  end

  task automatic write_frame(input byte unsigned f[$], input bit good);
    foreach (f[i]) begin @(negedge clk); iv = 1; id = f[i]; end
    @(negedge clk); iv = 0; iend = 1; igood = good;
    @(negedge clk); iend = 0; igood = 0;
  endtask

  function automatic void rnd(input int len, output byte unsigned f[$]);
    f = {};
    for (int i = 0; i < len; i++) f.push_back(byte'($urandom));
  endfunction

  initial begin
    byte unsigned f[$];
    repeat (3) @(negedge clk); rst_n = 1;
    // document example
    allow = 1;
    f = {8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66, 8'h77, 8'h88, 8'h99};
    exp_q.push_back(f); write_frame(f, 1);
    repeat (10) @(negedge clk);
    checks++; if (n_out != 1) begin failures++; $display("FAIL example not read"); end
    // random good / bad frames
    for (int n = 0; n < 40; n++) begin
      bit g; g = ($urandom_range(0, 3) != 0);
      rnd($urandom_range(1, 200), f);
      if (g) exp_q.push_back(f);
      write_frame(f, g);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    // fill the RAM with the read side blocked: 6 x 300 bytes fit in 2048,
    // the 7th does not, a 200-byte frame after it still does
    allow = 0;
    begin
      int d0; d0 = n_drop;
      for (int n = 0; n < 6; n++) begin rnd(300, f); exp_q.push_back(f); write_frame(f, 1); end
      rnd(300, f); write_frame(f, 1);
      rnd(200, f); exp_q.push_back(f); write_frame(f, 1);
      checks++; if (n_drop != d0 + 1) begin failures++; $display("FAIL overflow drops %0d", n_drop - d0); end
    end
    allow = 1;
    repeat (3000) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d frames missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
