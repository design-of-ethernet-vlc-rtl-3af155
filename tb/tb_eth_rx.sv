// Testbench for eth_rx: drives GMII frames (good, bad FCS, too short,
// rx_er, not enabled) and checks the forwarded bytes, the verdict, the
// length and that out_end comes one clock after the last byte.
module tb_eth_rx;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] rxd = 0; logic dv = 0, er = 0;
  logic ov, oe, og; logic [7:0] od; logic [15:0] ol;
  int checks = 0, failures = 0;

  eth_rx dut (.clk, .rst_n, .en, .gmii_rxd(rxd), .gmii_rx_dv(dv), .gmii_rx_er(er),
              .out_valid(ov), .out_data(od), .out_end(oe), .out_good(og), .out_len(ol));

  always #4 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  byte unsigned got[$];
  int ends = 0; logic last_good; int last_len; int last_valid_cyc, end_cyc, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (ov) begin got.push_back(od); last_valid_cyc = cyc; end
    if (oe) begin ends++; last_good = og; last_len = ol; end_cyc = cyc; end
  end

  task automatic send(input byte unsigned f[$], input int er_at);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); dv = 1; rxd = (i == 7) ? 8'hD5 : 8'h55; er = 0;
    end
    foreach (f[i]) begin @(negedge clk); rxd = f[i]; er = (i == er_at); end
    @(negedge clk); dv = 0; er = 0;
    repeat (14) @(negedge clk);
  endtask

  task automatic check(input string name, input bit exp_good, input byte unsigned f[$]);
    checks++;
    if (ends != 1 || last_good != exp_good || last_len != f.size()) begin
      failures++; $display("FAIL %s: ends=%0d good=%0d len=%0d", name, ends, last_good, last_len);
    end
    checks++;
    if (got != f) begin failures++; $display("FAIL %s: data mismatch", name); end
    checks++;
    if (end_cyc != last_valid_cyc + 1) begin failures++; $display("FAIL %s: end timing", name); end
    got = {}; ends = 0;
  endtask

  initial begin
    byte unsigned f[$];
    repeat (3) @(negedge clk); rst_n = 1;
    make_eth_frame(64, f);  send(f, -1);
    checks++; if (ends != 0 || got.size() != 0) begin failures++; $display("FAIL: accepted while disabled"); end
    got = {}; ends = 0;
    en = 1;
    for (int n = 0; n < 20; n++) begin
      make_eth_frame($urandom_range(64, 300), f); send(f, -1); check("good", 1, f);
    end
    make_eth_frame(1518, f); send(f, -1); check("max", 1, f);
    make_eth_frame(100, f); f[50] ^= 8'h04; send(f, -1); check("badfcs", 0, f);
    make_eth_frame(60, f); send(f, -1); check("short", 0, f);
    make_eth_frame(1519, f); send(f, -1); check("long", 0, f);
    make_eth_frame(80, f); send(f, 10); check("rx_er", 0, f);
    make_eth_frame(64, f); send(f, -1); check("good after", 1, f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
