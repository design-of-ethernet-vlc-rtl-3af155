// Bit-width conversion, 8 bits to 32 bits (downlink).
//
// Received Ethernet bytes are written into a 2048-byte pseudo-dual-port RAM
// that is written a byte at a time and read a 32-bit word at a time; a
// frame-length FIFO (11 bits wide, 32 deep: 2048 bytes / 64-byte minimum
// frame) remembers the length of every stored frame. Three pointers manage
// the RAM, as the document describes:
//   WP  write pointer, advances one byte per written byte;
//   VP  valid pointer, the end of the last frame whose CRC was good;
//   RP  read pointer, advances one word per word read.
// When a frame ends good (in_end with in_good), its length is pushed into
// the length FIFO and VP and WP move to the next multiple of four bytes,
// so every frame starts on a word boundary. When it ends bad, WP returns
// to VP and the frame is forgotten. A frame that meets a full RAM or a
// full length FIFO is dropped the same way (this design's choice; the
// document does not say what happens when the RAM fills).
// Read side: when the length FIFO is not empty and out_allow is high, the
// head length is popped and ceil(len/4) words are read back to back, the
// first byte of the frame in bits 31:24 (as in the read timing diagram,
// where bytes 11 22 33 44 ... come out as 0x11223344). RAM read latency
// is one clock; out_sof/out_eof mark the first/last word and out_len
// carries the byte length with out_sof. Single clock domain.
module width_8to32 #(
  parameter int unsigned ADDR_W    = 11,  // byte address: 2048 bytes = 16 Kb
  parameter int unsigned LEN_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // byte side
  input  logic              in_valid,
  input  logic [7:0]        in_data,
  input  logic              in_end,
  input  logic              in_good,
  // word side
  input  logic              out_allow,
  output logic              out_valid,
  output logic [31:0]       out_data,
  output logic              out_sof,
  output logic              out_eof,
  output logic [ADDR_W-1:0] out_len,
  // status
  output logic              frame_ok,    // pulse: frame committed
  output logic              frame_drop   // pulse: frame discarded
);
  localparam int unsigned WA    = ADDR_W - 2;   // word address width
  localparam int unsigned BYTES = 2 ** ADDR_W;

  logic [31:0] ram [2**WA];

  logic [ADDR_W:0] wp, vp, rp;        // byte pointers with wrap bit
  logic [ADDR_W:0] flen;              // bytes in the frame being written
  logic            ovf;

  // length FIFO
  logic              lf_wr, lf_rd, lf_empty, lf_full;
  logic [ADDR_W-1:0] lf_dout;
  logic [$clog2(LEN_DEPTH):0] lf_count;

  sync_fifo #(.WIDTH(ADDR_W), .DEPTH(LEN_DEPTH)) u_len_fifo (
    .clk, .rst_n, .wr_en(lf_wr), .din(flen[ADDR_W-1:0]), .rd_en(lf_rd),
    .dout(lf_dout), .empty(lf_empty), .full(lf_full), .count(lf_count)
  );

  // ---------------- write side ----------------
  wire [ADDR_W:0] used     = wp - rp;
  wire            ram_full = (used == (ADDR_W+1)'(BYTES));
  wire            do_wr    = in_valid && !ram_full && !ovf;
  wire [ADDR_W:0] wp_align = (wp + (ADDR_W+1)'(3)) & ~(ADDR_W+1)'(3);
  wire            commit   = in_end && in_good && !ovf && !lf_full && (flen != 0);

  assign lf_wr = commit;

  always_ff @(posedge clk)
    if (do_wr) ram[wp[ADDR_W-1:2]][8*(3 - int'(wp[1:0])) +: 8] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; vp <= '0; flen <= '0; ovf <= 1'b0;
      frame_ok <= 1'b0; frame_drop <= 1'b0;
    end else begin
      frame_ok   <= 1'b0;
      frame_drop <= 1'b0;
      if (in_end) begin
        if (commit) begin
          wp <= wp_align;
          vp <= wp_align;
          frame_ok <= 1'b1;
        end else begin
          wp <= vp;
          frame_drop <= 1'b1;
        end
        flen <= '0;
        ovf  <= 1'b0;
      end else if (in_valid) begin
        if (do_wr) begin
          wp   <= wp + 1'b1;
          flen <= flen + 1'b1;
        end else begin
          ovf  <= 1'b1;
        end
      end
    end
  end

  // ---------------- read side ----------------
  logic          rd_busy, rden, rden_q, first_q;
  logic [WA:0]   words_left;
  logic [WA-1:0] raddr;
  logic [31:0]   ram_q;

  assign lf_rd = !rd_busy && !lf_empty && out_allow;

  always_ff @(posedge clk) if (rden) ram_q <= ram[raddr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= 1'b0; rden <= 1'b0; rden_q <= 1'b0; first_q <= 1'b0;
      words_left <= '0; raddr <= '0; rp <= '0; out_len <= '0;
    end else begin
      rden_q <= rden;
      if (lf_rd) begin
        rd_busy    <= 1'b1;
        rden       <= 1'b1;
        first_q    <= 1'b1;
        out_len    <= lf_dout;
        raddr      <= rp[ADDR_W-1:2];
        words_left <= (WA+1)'(((ADDR_W+2)'(lf_dout) + (ADDR_W+2)'(3)) >> 2);
      end else if (rden) begin
        first_q    <= 1'b0;
        raddr      <= raddr + 1'b1;
        rp         <= rp + (ADDR_W+1)'(4);
        words_left <= words_left - 1'b1;
        if (words_left == 1) begin
          rden    <= 1'b0;
          rd_busy <= 1'b0;
        end
      end
    end
  end

  logic sof_q, eof_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sof_q <= 1'b0; eof_q <= 1'b0;
    end else begin
      sof_q <= rden && first_q;
      eof_q <= rden && (words_left == 1);
    end
  end

  assign out_valid = rden_q;
  assign out_data  = ram_q;
  assign out_sof   = sof_q;
  assign out_eof   = eof_q;
endmodule
