// Testbench for rgmii_rs: drives RGMII receive pins double-data-rate
// (low nibble and RX_DV at the rising edge, high nibble and DV^ER at the
// falling edge) and checks the assembled bytes and flags one clock later;
// drives the GMII transmit side and samples the RGMII transmit pins in
// both clock phases.
module tb_rgmii_rs;
  logic clk = 0, rst_n = 0;
  logic [3:0] rxd = 0, txd_p; logic rxctl = 0, txctl, txc;
  logic [7:0] g_rxd, g_txd = 0; logic g_dv, g_er, g_txen = 0, g_txer = 0;
  int checks = 0, failures = 0;

  rgmii_rs dut (.clk, .rst_n, .rgmii_rxd(rxd), .rgmii_rx_ctl(rxctl), .rgmii_txd(txd_p),
                .rgmii_tx_ctl(txctl), .rgmii_txc(txc), .gmii_rxd(g_rxd), .gmii_rx_dv(g_dv),
                .gmii_rx_er(g_er), .gmii_txd(g_txd), .gmii_tx_en(g_txen), .gmii_tx_er(g_txer));

  always #4 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int cyc = 0;
  logic [7:0] rb [$]; logic rdv [$]; logic rer [$]; int due [$];
  bit rx_done = 0;
  always @(posedge clk) begin
    cyc++;
    #1;
    if (due.size() != 0 && due[0] == cyc) begin
      checks++;
      if (g_rxd != rb[0] || g_dv != rdv[0] || g_er != rer[0]) begin
        failures++; $display("FAIL rx: %h/%b/%b exp %h/%b/%b", g_rxd, g_dv, g_er, rb[0], rdv[0], rer[0]);
      end
      void'(rb.pop_front()); void'(rdv.pop_front()); void'(rer.pop_front()); void'(due.pop_front());
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic [7:0] b; logic dv, er;
      b = 8'($urandom); dv = 1'($urandom); er = ($urandom_range(0, 7) == 0);
      // low nibble set 2 ns after a falling edge is sampled at rising edge
      // k+1, the high nibble at the falling edge after it; the byte is out
      // after rising edge k+2
      @(negedge clk); #2 rxd = b[3:0]; rxctl = dv;
      rb.push_back(b); rdv.push_back(dv); rer.push_back(er); due.push_back(cyc + 2);
      @(posedge clk); #2 rxd = b[7:4]; rxctl = dv ^ er;
    end
    repeat (4) @(posedge clk);
    checks++; if (due.size() != 0) begin failures++; $display("FAIL rx left %0d", due.size()); end
    // transmit
    for (int i = 0; i < 200; i++) begin
      logic [7:0] b; logic en, er;
      b = 8'($urandom); en = 1'($urandom); er = ($urandom_range(0, 5) == 0);
      @(negedge clk); g_txd = b; g_txen = en; g_txer = er;
      @(posedge clk); #1;                 // registered: now on the pins, clk high
      checks++;
      if (txd_p != b[3:0] || txctl != en || txc != 1'b1) begin
        failures++; $display("FAIL tx lo %0d", i);
      end
      @(negedge clk); #1;                 // clk low: high nibble
      checks++;
      if (txd_p != b[7:4] || txctl != (en ^ er) || txc != 1'b0) begin
        failures++; $display("FAIL tx hi %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
