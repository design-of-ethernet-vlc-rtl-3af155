// Testbench for eth_tx: a source sends frames whenever ready allows; the
// monitor checks preamble, delimiter and bytes, that TX_EN stays high for
// exactly 8 + length clocks, that ready comes back after exactly 12 idle
// clocks (96 ns at 8 ns), and that ready is low while en is low. Most
// frames carry a correct FCS (from the reference CRC); some have a broken
// one, and for those TX_ER must be high on the last byte and nowhere else.
module tb_eth_tx;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic iv = 0; logic [7:0] id = 0;
  logic ready, txen, txer; logic [7:0] txd;
  int checks = 0, failures = 0;

  eth_tx dut (.clk, .rst_n, .en, .in_valid(iv), .in_data(id), .ready,
              .gmii_txd(txd), .gmii_tx_en(txen), .gmii_tx_er(txer));

  always #4 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  byte unsigned sent[$][$];
  bit           sent_bad[$];
  byte unsigned cur[$];
  bit           cur_er[$];
  int           n_bad_seen = 0;
  int idle = 100, frames = 0;
  bit  was_en = 0, ready_seen = 1;

  always @(posedge clk) if (rst_n) begin
    if (txen) begin
      cur.push_back(txd);
      cur_er.push_back(txer);
      if (!was_en && idle < 12) begin failures++; $display("FAIL gap %0d", idle); end
      if (!was_en) begin checks++; ready_seen = 0; end
      idle = 0;
    end else begin
      if (was_en) begin
        byte unsigned exp[$];
        bit bad;
        exp = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
        exp = {exp, sent.pop_front()};
        bad = sent_bad.pop_front();
        checks++;
        if (cur != exp) begin failures++; $display("FAIL frame %0d mismatch (%0d vs %0d bytes)", frames, cur.size(), exp.size()); end
        foreach (cur_er[i]) begin
          checks++;
          if (cur_er[i] != (bad && i == cur_er.size() - 1)) begin
            failures++; $display("FAIL frame %0d tx_er=%0d at byte %0d (bad FCS %0d)", frames, cur_er[i], i, bad);
          end
        end
        if (bad) n_bad_seen++;
        cur = {}; cur_er = {}; frames++;
      end
      idle++;
      if (ready && !ready_seen && en) begin
        ready_seen = 1; checks++;
        if (idle != 12) begin failures++; $display("FAIL ready after %0d idle clocks", idle); end
      end
    end
    checks++;
    if (txer && !txen) begin failures++; $display("FAIL tx_er outside a frame"); end
    was_en = txen;
  end

  task automatic send(input int len, input bit bad = 0);
    byte unsigned f[$];
    make_eth_frame(len, f);
    if (bad) f[len - 1 - $urandom_range(0, 3)] ^= 8'h01 << $urandom_range(0, 7);
    @(negedge clk);
    while (!ready) @(negedge clk);
    sent.push_back(f);
    sent_bad.push_back(bad);
    foreach (f[i]) begin iv = 1; id = f[i]; @(negedge clk); end
    iv = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    checks++; if (ready) begin failures++; $display("FAIL ready while disabled"); end
    en = 1;
    for (int n = 0; n < 30; n++) send($urandom_range(64, 200), n % 4 == 3);
    send(1518);
    send(1518, 1);
    repeat (40) @(negedge clk);
    checks++; if (frames != 32) begin failures++; $display("FAIL frames=%0d", frames); end
    checks++; if (n_bad_seen != 8) begin failures++; $display("FAIL bad frames seen %0d", n_bad_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
