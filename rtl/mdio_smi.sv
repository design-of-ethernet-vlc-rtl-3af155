// Serial management interface (SMI): MDC/MDIO master that brings up the
// Ethernet PHY.
//
// After reset it runs a fixed sequence of IEEE 802.3 clause-22 frames to
// PHY address PHY_ADDR: write BMCR (register 0) = 0x8000 (PHY reset), read
// BMCR until the self-clearing reset bit is gone, write BMCR = 0x1200
// (auto-negotiation enable + restart), then read BMSR (register 1) until
// both "auto-negotiation complete" (bit 5) and "link status" (bit 2) are
// set. Then link_up goes high, which enables the Ethernet RX/TX logic. The
// BMSR is polled further; a lost link drops link_up and the master waits
// for it again. Each frame is 32 preamble ones, start 01, opcode (01 write,
// 10 read), 5-bit PHY and register addresses, turnaround and 16 data bits,
// MSB first. MDC = clk / (2*MDC_DIV); the master changes MDIO at the
// falling MDC edge and samples read data at the rising edge. mdio is
// split into mdio_o, mdio_oe and mdio_i; the pad's tri-state buffer joins
// them.
// Reset and auto-negotiation through MDC/MDIO follow the document; the
// register values, polling scheme and MDC rate are this design's choices.
module mdio_smi #(
  parameter int unsigned MDC_DIV  = 25,        // 125 MHz / 50 = 2.5 MHz
  parameter logic [4:0]  PHY_ADDR = 5'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        mdc,
  output logic        mdio_o,
  output logic        mdio_oe,
  input  logic        mdio_i,
  output logic        link_up,
  output logic [15:0] last_rdata
);
  typedef enum logic [2:0] {
    Q_RESET_WR, Q_RESET_POLL, Q_AN_WR, Q_LINK_POLL, Q_RUN_POLL
  } step_t;

  step_t       step;
  logic [7:0]  div_cnt;
  logic        tick_r, tick_f;     // MDC rising / falling instants
  logic        active, is_read;
  logic [6:0]  bitn;               // 0..63 inside a frame
  logic [63:0] sh;
  logic [15:0] rdata;
  logic        done;

  // MDC generation
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      div_cnt <= '0; mdc <= 1'b0; tick_r <= 1'b0; tick_f <= 1'b0;
    end else begin
      tick_r <= 1'b0; tick_f <= 1'b0;
      if (div_cnt == 8'(MDC_DIV - 1)) begin
        div_cnt <= '0;
        mdc     <= !mdc;
        if (mdc) tick_f <= 1'b1; else tick_r <= 1'b1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end

  function automatic logic [63:0] frame(input logic rd, input logic [4:0] reg_a,
                                        input logic [15:0] wd);
    return {32'hFFFF_FFFF, 2'b01, rd ? 2'b10 : 2'b01, PHY_ADDR, reg_a, 2'b10, wd};
  endfunction

  // frame engine: shifts on MDC falling edge, samples on rising edge
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      active <= 1'b0; is_read <= 1'b0; bitn <= '0; sh <= '1; rdata <= '0;
      mdio_o <= 1'b1; mdio_oe <= 1'b0; done <= 1'b0; step <= Q_RESET_WR;
      link_up <= 1'b0; last_rdata <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (tick_f) begin
          active <= 1'b1;
          bitn   <= '0;
          unique case (step)
            Q_RESET_WR:   begin is_read <= 1'b0; sh <= frame(1'b0, 5'd0, 16'h8000); end
            Q_RESET_POLL: begin is_read <= 1'b1; sh <= frame(1'b1, 5'd0, 16'h0000); end
            Q_AN_WR:      begin is_read <= 1'b0; sh <= frame(1'b0, 5'd0, 16'h1200); end
            default:      begin is_read <= 1'b1; sh <= frame(1'b1, 5'd1, 16'h0000); end
          endcase
        end
      end else begin
        if (tick_f) begin
          if (bitn == 7'd64) begin
            active  <= 1'b0;
            mdio_oe <= 1'b0;
            done    <= 1'b1;
          end else begin
            mdio_o  <= sh[63];
            sh      <= {sh[62:0], 1'b1};
            // a read releases MDIO from the turnaround on
            mdio_oe <= !(is_read && bitn >= 7'd46);
            bitn    <= bitn + 1'b1;
          end
        end
        if (tick_r && is_read && bitn >= 7'd49)
          rdata <= {rdata[14:0], mdio_i};
      end

      if (done) begin
        if (is_read) last_rdata <= rdata;
        unique case (step)
          Q_RESET_WR:   step <= Q_RESET_POLL;
          Q_RESET_POLL: if (!rdata[15]) step <= Q_AN_WR;
          Q_AN_WR:      step <= Q_LINK_POLL;
          Q_LINK_POLL:  if (rdata[5] && rdata[2]) begin
                          step <= Q_RUN_POLL; link_up <= 1'b1;
                        end
          Q_RUN_POLL:   if (!rdata[2]) begin
                          step <= Q_LINK_POLL; link_up <= 1'b0;
                        end
          default:      step <= Q_RESET_WR;
        endcase
      end
    end
endmodule
