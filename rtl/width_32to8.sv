// Bit-width conversion, 32 bits to 8 bits (uplink).
//
// The mirror image of width_8to32, as the document says the two directions
// work alike: a 2048-byte pseudo-dual-port RAM, written one 32-bit word per
// clock and read one byte per clock, plus an 11-bit x 32 frame-length FIFO.
// Write pointer WP and valid pointer VP count words: words of a frame go
// in at WP; at in_eof the frame is committed (length pushed, VP moves to
// WP) if in_good is set and nothing overflowed, otherwise WP falls back to
// VP. in_allow is high while at least ALLOW_BYTES are free, so the source
// only starts a frame that surely fits (this design's choice).
// Read side: when a length is waiting and out_start (the Ethernet
// transmitter's ready) is high, the length is popped and the frame's bytes
// leave back to back on out_valid/out_data, first byte taken from bits
// 31:24 of the first word. The RAM is read every clock; output latency is
// two clocks from the pop. The read pointer RP releases the frame's words
// when its last byte has been read. Single clock domain.
module width_32to8 #(
  parameter int unsigned ADDR_W      = 11,   // byte address: 2048 bytes
  parameter int unsigned LEN_DEPTH   = 32,
  parameter int unsigned ALLOW_BYTES = 1520  // largest frame, word-rounded
) (
  input  logic              clk,
  input  logic              rst_n,
  // word side
  output logic              in_allow,
  input  logic              in_valid,
  input  logic [31:0]       in_data,
  input  logic              in_sof,
  input  logic              in_eof,
  input  logic              in_good,
  input  logic [ADDR_W-1:0] in_len,
  // byte side
  input  logic              out_start,
  output logic              out_valid,
  output logic [7:0]        out_data,
  // status
  output logic              frame_ok,
  output logic              frame_drop
);
  localparam int unsigned WA    = ADDR_W - 2;
  localparam int unsigned WORDS = 2 ** WA;

  logic [31:0] ram [WORDS];
  logic [WA:0] wp, vp, rp;
  logic        ovf;
  logic [ADDR_W-1:0] len_q;

  logic              lf_rd, lf_empty, lf_full, lf_wr;
  logic [ADDR_W-1:0] lf_dout;
  logic [$clog2(LEN_DEPTH):0] lf_count;

  sync_fifo #(.WIDTH(ADDR_W), .DEPTH(LEN_DEPTH)) u_len_fifo (
    .clk, .rst_n, .wr_en(lf_wr), .din(in_sof ? in_len : len_q), .rd_en(lf_rd),
    .dout(lf_dout), .empty(lf_empty), .full(lf_full), .count(lf_count)
  );

  // ---------------- write side ----------------
  wire [WA:0] used     = wp - rp;
  wire        ram_full = (used == (WA+1)'(WORDS));
  wire        ovf_now  = (in_sof ? 1'b0 : ovf) || (in_valid && ram_full);
  wire        do_wr    = in_valid && !ovf_now;
  wire        commit   = in_valid && in_eof && in_good && !ovf_now && !lf_full;

  assign lf_wr    = commit;
  assign in_allow = ((WA+1)'(WORDS) - used) >= (WA+1)'((ALLOW_BYTES + 3) / 4);

  always_ff @(posedge clk) if (do_wr) ram[wp[WA-1:0]] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; vp <= '0; ovf <= 1'b0; len_q <= '0;
      frame_ok <= 1'b0; frame_drop <= 1'b0;
    end else begin
      frame_ok   <= 1'b0;
      frame_drop <= 1'b0;
      if (in_valid) begin
        if (in_sof) len_q <= in_len;
        ovf <= ovf_now;
        if (in_eof) begin
          ovf <= 1'b0;
          if (commit) begin
            wp <= wp + 1'b1;
            vp <= wp + 1'b1;
            frame_ok <= 1'b1;
          end else begin
            wp <= vp;
            frame_drop <= 1'b1;
          end
        end else if (do_wr) begin
          wp <= wp + 1'b1;
        end
      end
    end
  end

  // ---------------- read side ----------------
  logic              busy, s1_valid;
  logic [ADDR_W-1:0] k, rlen;
  logic [1:0]        lane_q;
  logic [31:0]       ram_q;

  assign lf_rd = !busy && !lf_empty && out_start;
  wire [WA-1:0] raddr = rp[WA-1:0] + k[ADDR_W-1:2];

  always_ff @(posedge clk) ram_q <= ram[raddr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; k <= '0; rlen <= '0; rp <= '0;
      s1_valid <= 1'b0; lane_q <= '0; out_valid <= 1'b0;
    end else begin
      s1_valid  <= busy;
      lane_q    <= k[1:0];
      out_valid <= s1_valid;
      if (lf_rd) begin
        busy <= 1'b1;
        rlen <= lf_dout;
        k    <= '0;
      end else if (busy) begin
        if (k == rlen - 1'b1) begin
          busy <= 1'b0;
          k    <= '0;
          rp   <= rp + (WA+1)'(((ADDR_W+1)'(rlen) + (ADDR_W+1)'(3)) >> 2);
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

  logic [1:0] lane_q2;
  logic [31:0] word_q;
  always_ff @(posedge clk) begin
    lane_q2 <= lane_q;
    word_q  <= ram_q;
  end
  assign out_data = word_q[8*(3 - int'(lane_q2)) +: 8];
endmodule
