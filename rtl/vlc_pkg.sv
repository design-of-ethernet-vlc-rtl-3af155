// Shared constants and functions of the Ethernet-VLC data conversion system.
//
// Holds the Ethernet and VLC framing constants and the CRC-32 used in both
// places: the Ethernet frame check sequence and the VLC frame check. The
// CRC is the IEEE 802.3 polynomial in its reflected form (0xEDB88320),
// register preset to all ones, result inverted; a receiver that runs the
// CRC over data plus the appended check word ends with the fixed residue
// CRC_RESIDUE. Bytes of a 32-bit VLC word are taken lane 0 (bits 7:0)
// first, the lane a serial transceiver sends first.
//
// VLC code words follow the transmitter and receiver waveforms of the
// design: the sync word 0xff0001bc, the start delimiter
// {0xff, length[15:0], 0xfb} (a 64-byte frame is announced as
// 0xff0040fb), and the idle word 0xbcbcbcbc, all with only lane 0
// flagged as a K character (K28.5 or K27.7). The frame description in
// prose gives the sync word as 0xff0000bc; the waveforms are followed.
package vlc_pkg;

  localparam logic [31:0] CRC_INIT    = 32'hFFFF_FFFF;
  localparam logic [31:0] CRC_RESIDUE = 32'hDEBB_20E3;

  // Ethernet
  localparam logic [7:0]  ETH_PREAMBLE = 8'h55;
  localparam logic [7:0]  ETH_SFD      = 8'hD5;
  localparam int unsigned ETH_MIN_LEN  = 64;    // bytes, incl. FCS
  localparam int unsigned ETH_MAX_LEN  = 1518;  // bytes, incl. FCS
  localparam int unsigned ETH_IFG_CLKS = 12;    // 96 ns at 8 ns per clock

  // VLC frame words (32-bit, charisk marks K characters per byte lane)
  localparam logic [31:0] VLC_SYNC      = 32'hFF00_01BC;
  localparam logic [3:0]  VLC_SYNC_K    = 4'b0001;
  localparam logic [7:0]  VLC_SFD_HI    = 8'hFF;
  localparam logic [7:0]  VLC_SFD_LO    = 8'hFB;   // K27.7
  localparam logic [3:0]  VLC_SFD_K     = 4'b0001;
  localparam logic [31:0] VLC_IDLE      = 32'hBCBC_BCBC; // K28.5 + D28.5 x3
  localparam logic [3:0]  VLC_IDLE_K    = 4'b0001;

  // Monitoring pulses of the top level, Ethernet clock domain.
  typedef struct packed {
    logic rx_frame_good;   // Ethernet frame with good FCS stored for the downlink
    logic rx_frame_drop;   // Ethernet frame discarded (bad FCS or no room)
    logic dl_frame_in;     // frame entered the Ethernet-VLC buffer
    logic dl_frame_drop;   // frame refused by the paused Ethernet-VLC buffer
    logic dl_fragment;     // fragment left in the Ethernet-VLC buffer
    logic dl_paused;       // level: Ethernet-VLC buffer write paused
    logic ul_flush;        // VLC-Ethernet buffer fragment cleaned
    logic tx_frame;        // frame queued for Ethernet transmission
    logic tx_frame_drop;   // frame lost in the 32-to-8 converter
  } eth_events_t;

  // Monitoring pulses of the top level, transceiver clock domain.
  typedef struct packed {
    logic tx_frame;        // VLC frame sent
    logic rx_frame_good;   // VLC frame received with good CRC
    logic rx_frame_bad;    // VLC frame marked bad
    logic ul_frame_in;     // frame entered the VLC-Ethernet buffer
    logic ul_frame_drop;   // frame refused by the paused VLC-Ethernet buffer
    logic ul_fragment;     // fragment (bad frame) left in the VLC-Ethernet buffer
    logic ul_paused;       // level: VLC-Ethernet buffer write paused
    logic dl_flush;        // Ethernet-VLC buffer fragment cleaned
  } vlc_events_t;

  // One byte through the reflected CRC-32.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'h0, d};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction

  // Four bytes, lane 0 (bits 7:0) first.
  function automatic logic [31:0] crc32_word(input logic [31:0] crc, input logic [31:0] w);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 4; i++)
      c = crc32_byte(c, w[8*i +: 8]);
    return c;
  endfunction

  // Reverse the byte order of a word (first byte moves from bits 31:24,
  // the converters' order, to bits 7:0, the transceiver's order).
  function automatic logic [31:0] byte_swap(input logic [31:0] w);
    return {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction

endpackage
