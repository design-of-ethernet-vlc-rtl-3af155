// Testbench for mdio_smi against a behavioural PHY management model:
// checks the MDC period, that the PHY is reset and auto-negotiation
// restarted (register writes seen by the model), that link_up rises only
// after the model reports negotiation complete with link, that it falls
// when the link goes down and rises again when it returns, and that the
// master never drives MDIO while the PHY does.
module tb_mdio_smi;
  logic clk = 0, rst_n = 0;
  logic mdc, mdio_o, mdio_oe, mdio_i, link_up;
  logic [15:0] rdata;
  logic pdrive, pval, link_down = 0;
  int checks = 0, failures = 0;

  assign mdio_i = mdio_oe ? mdio_o : (pdrive ? pval : 1'b1);

  mdio_smi #(.MDC_DIV(4), .PHY_ADDR(5'd3)) dut (
    .clk, .rst_n, .mdc, .mdio_o, .mdio_oe, .mdio_i, .link_up, .last_rdata(rdata));
  phy_mdio_model #(.ADDR(5'd3), .RESET_READS(2), .AN_READS(3)) phy (
    .mdc, .mdio_in(mdio_i), .drive(pdrive), .drive_val(pval), .force_link_down(link_down));

  always #4 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (mdio_oe && pdrive) begin
    failures++; $display("FAIL bus contention");
  end

  // MDC period: 2*MDC_DIV clocks of 8 ns
  realtime t_last = 0; int mdc_checked = 0;
  always @(posedge mdc) begin
    if (t_last != 0 && mdc_checked < 20) begin
      checks++; mdc_checked++;
      if ($realtime - t_last != 64.0) begin failures++; $display("FAIL mdc period %0t", $realtime - t_last); end
    end
    t_last = $realtime;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // before negotiation completes link_up must stay low
    wait (phy.n_writes == 2);
    checks++; if (link_up) begin failures++; $display("FAIL link_up before AN"); end
    checks++; if (phy.bmcr[12] != 1'b1) begin failures++; $display("FAIL AN not enabled: %h", phy.bmcr); end
    wait (link_up);
    checks++; if (!phy.an_done) begin failures++; $display("FAIL link_up without AN done"); end
    checks++; if (phy.n_writes != 2) begin failures++; $display("FAIL writes=%0d", phy.n_writes); end
    // reset (2 BMCR reads) + AN (3 BMSR reads): at least 5 reads
    checks++; if (phy.n_reads < 5) begin failures++; $display("FAIL reads=%0d", phy.n_reads); end
    checks++; if (rdata[5] != 1'b1 || rdata[2] != 1'b1) begin failures++; $display("FAIL rdata %h", rdata); end
    link_down = 1;
    wait (!link_up);
    checks++;
    link_down = 0;
    wait (link_up);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
