// Frame buffer between the Ethernet clock domain and the VLC transceiver
// clock domain (used once per direction).
//
// Two dual-clock FIFOs as the document describes: DFIFO holds the 32-bit
// frame words and IFIFO holds one length entry per complete frame.
//
// Write side (wclk). A frame arrives as words with in_sof on the first
// word (in_len, the byte length, is taken there) and in_eof on the last
// (in_good says whether the frame passed its check). The write control
// follows the threshold flowchart: when the DFIFO count rises above
// D_UPPER (or the IFIFO count above I_UPPER) writing is paused, and it
// resumes only once the counts fall below D_LOWER and I_LOWER. wr_allow
// tells the source whether a frame may start now; the pause is applied at
// frame boundaries (a source that cannot wait, like the VLC receiver,
// loses the frame, which the Ethernet timeout retransmission recovers).
// A frame that ends bad, or meets a full DFIFO/IFIFO, leaves its words in
// DFIFO without a length entry: a fragment.
//
// Fragment cleaning. After writing a fragment the write side stops taking
// frames and raises frag_req. The read side, once IFIFO is empty (every
// good frame ahead of the fragment has been read), empties DFIFO and
// answers with frag_ack; a four-phase handshake then lets writing resume.
// This is the document's "IFIFO empty and DFIFO not empty means a
// fragment: stop writing and empty the FIFO" rule; the explicit
// request from the write side is this design's choice, so that a
// fragment is never mistaken for a frame that is still being written.
//
// Read side (rclk). With IFIFO not empty and out_allow high, the length is
// popped (out_len, valid with out_sof) and ceil(len/4) words are handed
// out with a valid/ready handshake, out_eof on the last.
//
// Defaults are the document's downlink (Ethernet-VLC) sizes: DFIFO 8192 x
// 32 with thresholds 7811 and 3715. The uplink instance uses DFIFO 1024 x
// 32 and IFIFO thresholds 495 and 8. The IFIFO depth of 512 is this
// design's choice (the document gives it only through the 511 in the
// uplink threshold).
module frame_buffer #(
  parameter int unsigned D_AW    = 13,     // DFIFO depth 2**D_AW words
  parameter int unsigned I_AW    = 9,      // IFIFO depth 2**I_AW entries
  parameter int unsigned LEN_W   = 16,
  parameter int unsigned D_UPPER = 7811,   // 8191 - 190*2
  parameter int unsigned D_LOWER = 3715,   // 4095 - 190*2
  parameter int unsigned I_UPPER = 2**I_AW,      // no IFIFO threshold
  parameter int unsigned I_LOWER = 2**I_AW + 1
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             in_valid,
  input  logic [31:0]      in_data,
  input  logic             in_sof,
  input  logic             in_eof,
  input  logic             in_good,
  input  logic [LEN_W-1:0] in_len,
  output logic             wr_allow,
  output logic             wr_paused,
  output logic [D_AW:0]    dfifo_data_count,
  output logic             ev_frame_in,    // pulse: frame stored
  output logic             ev_frame_drop,  // pulse: frame refused (paused/held)
  output logic             ev_fragment,    // pulse: fragment left in DFIFO

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             out_allow,
  input  logic             out_ready,
  output logic             out_valid,
  output logic [31:0]      out_data,
  output logic             out_sof,
  output logic             out_eof,
  output logic [LEN_W-1:0] out_len,
  output logic             ev_flush        // pulse: fragment cleaned out
);
  // ---------------- FIFOs ----------------
  logic          d_wr, d_full, d_rd, d_valid;
  logic [31:0]   d_dout;
  logic [D_AW:0] d_rcount;
  logic          i_wr, i_full, i_rd, i_valid;
  logic [LEN_W-1:0] i_dout;
  logic [I_AW:0] i_wcount, i_rcount;

  async_fifo #(.WIDTH(32), .AW(D_AW)) u_dfifo (
    .wclk, .wrst_n, .wr_en(d_wr), .din(in_data), .full(d_full), .wr_count(dfifo_data_count),
    .rclk, .rrst_n, .rd_en(d_rd), .dout(d_dout), .valid(d_valid), .rd_count(d_rcount)
  );

  logic [LEN_W-1:0] len_q, len_w;
  async_fifo #(.WIDTH(LEN_W), .AW(I_AW)) u_ififo (
    .wclk, .wrst_n, .wr_en(i_wr), .din(len_w), .full(i_full), .wr_count(i_wcount),
    .rclk, .rrst_n, .rd_en(i_rd), .dout(i_dout), .valid(i_valid), .rd_count(i_rcount)
  );

  // ---------------- write control ----------------
  logic in_frame, accepted, broken, wrote_any;
  logic frag_req, ack_s1, ack_s2, frag_ack;
  wire  hold = frag_req || ack_s2;

  assign wr_allow = !wr_paused && !hold;

  wire start    = in_valid && in_sof;
  wire acc_now  = start ? wr_allow : accepted;
  wire brk_now  = start ? 1'b0 : broken;
  assign d_wr   = in_valid && (start || in_frame) && acc_now && !brk_now && !d_full;
  wire  last    = in_valid && in_eof && (start || in_frame);
  wire  wrote   = wrote_any && !start || d_wr;
  wire  good_end = last && acc_now && !brk_now && !(in_valid && d_full) && in_good && !i_full;
  assign i_wr   = good_end;
  assign len_w  = start ? in_len : len_q;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wr_paused <= 1'b0; in_frame <= 1'b0; accepted <= 1'b0; broken <= 1'b0;
      wrote_any <= 1'b0; frag_req <= 1'b0; ack_s1 <= 1'b0; ack_s2 <= 1'b0;
      len_q <= '0; ev_frame_in <= 1'b0; ev_frame_drop <= 1'b0; ev_fragment <= 1'b0;
    end else begin
      ack_s1 <= frag_ack;
      ack_s2 <= ack_s1;
      ev_frame_in   <= good_end;
      ev_frame_drop <= start && !wr_allow;
      ev_fragment   <= 1'b0;

      // threshold hysteresis (Fig. 5 flowchart)
      if (!wr_paused && ((dfifo_data_count > (D_AW+1)'(D_UPPER)) ||
                         (32'(i_wcount) > I_UPPER)))
        wr_paused <= 1'b1;
      else if (wr_paused && (dfifo_data_count < (D_AW+1)'(D_LOWER)) &&
                            (32'(i_wcount) < I_LOWER))
        wr_paused <= 1'b0;

      if (start) begin
        in_frame  <= 1'b1;
        accepted  <= wr_allow;
        broken    <= 1'b0;
        len_q     <= in_len;
      end
      if (in_valid && (start || in_frame) && acc_now && d_full) broken <= 1'b1;
      if (in_valid && (start || in_frame)) wrote_any <= wrote;

      if (last) begin
        in_frame  <= 1'b0;
        wrote_any <= 1'b0;
        if (!good_end && wrote) begin
          frag_req    <= 1'b1;
          ev_fragment <= 1'b1;
        end
      end
      if (ack_s2) frag_req <= 1'b0;
    end
  end

  // ---------------- read control (Fig. 6) ----------------
  typedef enum logic [1:0] {R_IDLE, R_DATA, R_FLUSH, R_ACK} rstate_t;
  rstate_t          rstate;
  logic             req_s1, req_s2, first;
  logic [LEN_W-1:0] words_left;

  assign i_rd      = (rstate == R_IDLE) && i_valid && out_allow;
  assign out_valid = (rstate == R_DATA) && d_valid;
  assign out_data  = d_dout;
  assign out_sof   = out_valid && first;
  assign out_eof   = out_valid && (words_left == 1);
  assign d_rd      = ((rstate == R_DATA) && d_valid && out_ready) ||
                     ((rstate == R_FLUSH) && d_valid);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rstate <= R_IDLE; req_s1 <= 1'b0; req_s2 <= 1'b0; frag_ack <= 1'b0;
      first <= 1'b0; words_left <= '0; out_len <= '0; ev_flush <= 1'b0;
    end else begin
      req_s1   <= frag_req;
      req_s2   <= req_s1;
      ev_flush <= 1'b0;
      unique case (rstate)
        R_IDLE:
          if (i_rd) begin
            out_len    <= i_dout;
            words_left <= (i_dout + LEN_W'(3)) >> 2;
            first      <= 1'b1;
            rstate     <= R_DATA;
          end else if (!i_valid && req_s2) begin
            rstate <= R_FLUSH;
          end
        R_DATA:
          if (d_valid && out_ready) begin
            first      <= 1'b0;
            words_left <= words_left - 1'b1;
            if (words_left == 1) rstate <= R_IDLE;
          end
        R_FLUSH:
          if (!d_valid && d_rcount == 0) begin
            frag_ack <= 1'b1;
            ev_flush <= 1'b1;
            rstate   <= R_ACK;
          end
        R_ACK:
          if (!req_s2) begin
            frag_ack <= 1'b0;
            rstate   <= R_IDLE;
          end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // Frames must not overlap on the write side.
  a_no_nested_sof: assert property (@(posedge wclk) disable iff (!wrst_n)
    (in_valid && in_sof) |-> !in_frame);
endmodule
