// ethernet_addr_filter: layer-2 source-address filter for one Ethernet switch
// port, built on a 48x32 RCAM.
//
// Operation mode (en = 1): when the port's MAC unit starts moving a frame
// (`pkt_sop` with the first beat) the first three 32-bit beats - the 48-bit
// destination and source MAC addresses - are captured into two 48-bit
// buffers. In the following cycle the unit raises `hold`, pausing the frame
// transfer, while the RCAM compares the source address with the stored
// addresses. One cycle later `done` pulses with `pass` = 1 (match: forward the
// frame to the switch) or `drop` = 1 (no match: discard it); `location` is the
// matching entry. A decision thus arrives four cycles after the first beat.
// Programming mode (en = 0): the administrator writes or reads stored MAC
// addresses in two bus beats (see cam_filter_unit).
//
// Sizes, the two buffers, the 3-cycle capture, HOLD and the match/discard rule
// follow the document; the beat order and the pass/drop pulses are this
// design's choices.
module ethernet_addr_filter #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned SUB_W = rcam_pkg::SUB_W,
  localparam int unsigned BUS_W = rcam_pkg::BUS_W,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  // programming bus
  input  logic             req,
  input  logic             rdw,
  input  logic [AW-1:0]    addr,
  input  logic [BUS_W-1:0] wdata,
  output logic [BUS_W-1:0] rdata,
  output logic             rvalid,
  // frame stream from the port's MAC unit
  input  logic [BUS_W-1:0] pkt_data,
  input  logic             pkt_valid,
  input  logic             pkt_sop,
  output logic             hold,
  // decision
  output logic             done,
  output logic             pass,
  output logic             drop,
  output logic [AW-1:0]    location,
  output logic [47:0]      src_mac,
  output logic [47:0]      dst_mac
);
  localparam int unsigned HB = 3;            // header beats: DA + SA
  localparam int unsigned HW = HB * BUS_W;

  logic [HW-1:0] hdr;
  logic          hdr_full;
  logic          match;

  beat_collector #(.BEATS(HB)) u_hdr (
    .clk (clk), .rst_n (rst_n), .enable (en),
    .data (pkt_data), .valid (pkt_valid), .sop (pkt_sop),
    .buffer (hdr), .full (hdr_full)
  );

  assign dst_mac = hdr[HW - 1 - 8 * rcam_pkg::OFF_ETH_DA -: 48];
  assign src_mac = hdr[HW - 1 - 8 * rcam_pkg::OFF_ETH_SA -: 48];

  cam_filter_unit #(.WIDTH(48), .DEPTH(DEPTH), .SUB_W(SUB_W)) u_unit (
    .clk (clk), .rst_n (rst_n), .en (en),
    .req (req), .rdw (rdw), .addr (addr), .wdata (wdata),
    .rdata (rdata), .rvalid (rvalid),
    .key (src_mac), .key_valid (hdr_full),
    .hold (hold), .done (done), .match (match), .location (location)
  );

  assign pass = done && match;
  assign drop = done && !match;
endmodule
