// wlan_mac_filter: MAC address filter of a WLAN access point, built on a
// 48x128 RCAM holding the addresses of the clients allowed to associate.
//
// Operation mode (en = 1): the WLAN port extracts the source address of each
// incoming RTS frame and hands it over in two 32-bit beats (`sa_sop` with the
// first): SA[47:16], then SA[15:0] in bits 31:16. In the next cycle `hold`
// pauses the frame transfer while the RCAM compares the address with all
// stored ones; one cycle later `done` pulses with `accept` (found) or
// `reject` (not found). The check takes three cycles from the first beat.
// Programming mode (en = 0): permitted addresses are written or read in two
// bus beats (see cam_filter_unit).
//
// Sizes, the 2-cycle transfer, HOLD, the one-cycle compare and the three-cycle
// check follow the document; the beat layout is this design's choice.
module wlan_mac_filter #(
  parameter int unsigned DEPTH = 128,
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
  // source address from the WLAN port
  input  logic [BUS_W-1:0] sa_data,
  input  logic             sa_valid,
  input  logic             sa_sop,
  output logic             hold,
  // decision
  output logic             done,
  output logic             accept,
  output logic             reject,
  output logic [AW-1:0]    location
);
  localparam int unsigned HB = 2;
  localparam int unsigned HW = HB * BUS_W;

  logic [HW-1:0] sa_buf;
  logic          sa_full;
  logic          match;

  beat_collector #(.BEATS(HB)) u_sa (
    .clk (clk), .rst_n (rst_n), .enable (en),
    .data (sa_data), .valid (sa_valid), .sop (sa_sop),
    .buffer (sa_buf), .full (sa_full)
  );

  cam_filter_unit #(.WIDTH(48), .DEPTH(DEPTH), .SUB_W(SUB_W)) u_unit (
    .clk (clk), .rst_n (rst_n), .en (en),
    .req (req), .rdw (rdw), .addr (addr), .wdata (wdata),
    .rdata (rdata), .rvalid (rvalid),
    .key (sa_buf[HW-1 -: 48]), .key_valid (sa_full),
    .hold (hold), .done (done), .match (match), .location (location)
  );

  assign accept = done && match;
  assign reject = done && !match;
endmodule
