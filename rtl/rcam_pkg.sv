// rcam_pkg: constants and types shared by the reconfigurable CAM (RCAM) and
// the network units built on it.
//
// The system data bus of every unit is 32 bits wide; a CAM word wider than
// the bus is moved in ceil(WIDTH/32) beats, most significant beat first, the
// last beat left-aligned (unused low bits are zero). The CAM array is split
// into sub-arrays of 8-bit word slices, as in the network units.
//
// Header byte offsets assume an untagged Ethernet II frame carrying IPv4
// without options and a TCP or UDP header; byte 0 of a frame is the first
// byte of the destination MAC address and travels in bits 31:24 of the first
// beat (network byte order).
package rcam_pkg;

  localparam int unsigned BUS_W = 32;      // system data bus width
  localparam int unsigned SUB_W = 8;       // sub-array word-slice width

  // Number of bus beats needed to carry a word of w bits.
  function automatic int unsigned beats_for(int unsigned w);
    return (w + BUS_W - 1) / BUS_W;
  endfunction

  // Byte offsets inside the frame (Ethernet II + IPv4 + TCP/UDP).
  localparam int unsigned OFF_ETH_DA   = 0;
  localparam int unsigned OFF_ETH_SA   = 6;
  localparam int unsigned OFF_IP_TOS   = 15;
  localparam int unsigned OFF_IP_SRC   = 26;
  localparam int unsigned OFF_IP_DST   = 30;
  localparam int unsigned OFF_L4_SPORT = 34;
  localparam int unsigned OFF_L4_DPORT = 36;

  // Routing table entry held in the RAM beside the routing CAM.
  typedef struct packed {
    logic [31:0] next_hop;
    logic [7:0]  hop_count;
    logic [7:0]  iface;
  } route_entry_t;

endpackage
