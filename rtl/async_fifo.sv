// Dual-clock FIFO with Gray-coded pointers and a first-word-fall-through
// output register.
//
// Depth is 2**AW words. The write side sees full and wr_count (words held,
// counted against the synchronised read pointer, so it may over-state by a
// few cycles but never under-state; a word counts as held until it has
// been popped from the output register, not just moved into it). The
// read side sees valid with dout holding the head word; rd_en with valid pops it. The memory is read
// synchronously into the output register so it maps onto block RAM.
// Pointers cross domains through two flip-flops each. Each side has its
// own asynchronous active-low reset; both must be asserted together.
// The document asks only for asynchronous FIFOs between the two clock
// domains; the Gray-code structure and the output register are this
// design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 13
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  output logic [AW:0]      wr_count,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             valid,
  output logic [AW:0]      rd_count
);
  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, cbin, rgray;
  logic [AW:0] rgray_s1, rgray_s2, wgray_s1, wgray_s2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  wire do_wr = wr_en && !full;
  wire [AW:0] wbin_nx = wbin + 1'b1;

  always_ff @(posedge wclk) if (do_wr) mem[wbin[AW-1:0]] <= din;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_s1 <= '0; rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (do_wr) begin
        wbin  <= wbin_nx;
        wgray <= wbin_nx ^ (wbin_nx >> 1);
      end
    end
  end

  assign rbin_w   = g2b(rgray_s2);
  assign wr_count = wbin - rbin_w;
  assign full     = (wr_count[AW] == 1'b1);

  // ---------------- read domain -----------------
  logic mem_empty;
  assign wbin_r    = g2b(wgray_s2);
  assign mem_empty = (wbin_r == rbin);
  wire   fetch     = !mem_empty && (!valid || rd_en);
  wire [AW:0] rbin_nx = rbin + 1'b1;

  always_ff @(posedge rclk) if (fetch) dout <= mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; cbin <= '0; rgray <= '0; wgray_s1 <= '0; wgray_s2 <= '0; valid <= 1'b0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (fetch) begin
        rbin  <= rbin_nx;
        valid <= 1'b1;
      end else if (rd_en) begin
        valid <= 1'b0;
      end
      // the write side sees a word as gone only once it has been popped
      if (rd_en && valid) begin
        cbin  <= cbin + 1'b1;
        rgray <= (cbin + 1'b1) ^ ((cbin + 1'b1) >> 1);
      end
    end
  end

  assign rd_count = (wbin_r - rbin) + {{AW{1'b0}}, valid};
endmodule
