// Reference helpers for the testbenches, written independently of the RTL.
//
// ref_crc32 computes the Ethernet CRC-32 the "textbook" way: each byte is
// bit-reversed, fed MSB first through the normal polynomial 0x04C11DB7,
// and the final register is bit-reversed and inverted. The RTL uses the
// reflected shift form instead, so the two agree only if both are right.
package tb_util_pkg;

  function automatic logic [7:0] rev8(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = b[7-i];
    return r;
  endfunction

  function automatic logic [31:0] rev32(input logic [31:0] w);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = w[31-i];
    return r;
  endfunction

  // CRC over a byte queue; returns the value to transmit (already
  // inverted), whose bits 7:0 are sent first.
  function automatic logic [31:0] ref_crc32(input byte unsigned q[$]);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    foreach (q[i]) begin
      logic [7:0] b;
      b = rev8(q[i]);
      for (int k = 7; k >= 0; k--) begin
        logic fb;
        fb = c[31] ^ b[k];
        c  = {c[30:0], 1'b0};
        if (fb) c = c ^ 32'h04C1_1DB7;
      end
    end
    return ~rev32(c);
  endfunction

  // A random Ethernet frame of len bytes (DA..FCS) with a correct FCS.
  function automatic void make_eth_frame(input int len, output byte unsigned f[$]);
    logic [31:0] fcs;
    f = {};
    for (int i = 0; i < len - 4; i++) f.push_back(byte'($urandom_range(0, 255)));
    fcs = ref_crc32(f);
    for (int i = 0; i < 4; i++) f.push_back(fcs[8*i +: 8]);
  endfunction

endpackage
