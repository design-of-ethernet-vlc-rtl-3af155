// Behavioural model of the management side of an Ethernet PHY, for
// testbenches only. Decodes clause-22 MDIO frames on the rising MDC edge
// and answers reads by driving MDIO after the falling edge. Register 0
// (BMCR): writing bit 15 starts a reset that clears itself after
// RESET_READS reads; writing bit 9 restarts auto-negotiation, which
// completes after AN_READS further reads of register 1. Register 1 (BMSR)
// shows bit 5 (auto-negotiation complete) and bit 2 (link up, unless
// force_link_down is set).
module phy_mdio_model #(
  parameter logic [4:0] ADDR        = 5'd0,
  parameter int         RESET_READS = 2,
  parameter int         AN_READS    = 3
) (
  input  logic mdc,
  input  logic mdio_in,     // the bus value
  output logic drive,
  output logic drive_val,
  input  logic force_link_down
);
  int ones = 0, bitn = -1;
  logic [13:0] hdr;
  logic [15:0] wdata, rsh;
  logic [15:0] bmcr = 16'h1000;
  int reset_left = 0, an_left = -1;
  bit an_done = 0;
  int n_writes = 0, n_reads = 0;
  logic [4:0] reg_a;

  initial begin drive = 0; drive_val = 1; end

  always @(posedge mdc) begin
    if (bitn < 0) begin
      if (mdio_in) ones++;
      else begin
        if (ones >= 32) bitn = 0;   // this 0 is the first start bit
        ones = 0;
      end
    end else begin
      bitn++;
      if (bitn <= 13) hdr = {hdr[12:0], mdio_in};
      if (bitn == 13) begin
        // hdr = 1, op[1:0], phy[4:0], reg[4:0]  (14 bits incl. 2nd start bit)
        reg_a = hdr[4:0];
        if (hdr[9:5] == ADDR && hdr[11:10] == 2'b10) begin
          n_reads++;
          case (reg_a)
            5'd0: begin
              rsh = bmcr;
              if (reset_left > 0) begin
                reset_left--;
                if (reset_left == 0) bmcr[15] = 0;
              end
            end
            5'd1: begin
              if (an_left > 0) begin an_left--; if (an_left == 0) an_done = 1; end
              rsh = {10'b0111_1000_00, an_done, 2'b01, !force_link_down && an_done, 2'b01};
            end
            default: rsh = 16'h0;
          endcase
        end
      end
      if (hdr[11:10] == 2'b01 && bitn >= 16 && bitn <= 31) wdata = {wdata[14:0], mdio_in};
      if (hdr[11:10] == 2'b01 && bitn == 31) begin
        if (hdr[9:5] == ADDR) begin
          n_writes++;
          if (hdr[4:0] == 5'd0) begin
            bmcr = wdata;
            if (wdata[15]) begin reset_left = RESET_READS; an_done = 0; end
            if (wdata[9])  begin an_left = AN_READS; an_done = 0; bmcr[9] = 0; end
          end
        end
      end
      if (bitn == 31) bitn = -1;
    end
  end

  // read: drive turnaround 0 and 16 data bits, changing after falling MDC
  always @(negedge mdc) begin
    if (bitn >= 14 && bitn <= 30 && hdr[11:10] == 2'b10 && hdr[9:5] == ADDR) begin
      drive = 1;
      if (bitn == 14) drive_val = 0;
      else begin drive_val = rsh[15]; rsh = {rsh[14:0], 1'b0}; end
    end else begin
      drive = 0; drive_val = 1;
    end
  end
endmodule
