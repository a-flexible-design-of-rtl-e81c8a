// foc_unit: firewall on chip, a packet filter built on a 96x64 RCAM.
//
// Each of the 64 rules is one 96-bit word {source IP, destination IP,
// source port, destination port}; all four fields must match (the fields are
// ANDed, so a rule is compared as one block). Operation mode (en = 1): from
// the start of each frame (`pkt_sop`) the first ten 32-bit beats - Ethernet,
// IPv4 and TCP/UDP headers, bytes 0..39 - go into a temporary buffer and the
// four fields are cut out of it. In the next cycle `hold` pauses the frame
// transfer while the RCAM compares the fields with all rules; one cycle later
// `done` pulses with `permit` (a rule matched, `location` is the rule) or
// `deny`. Programming mode (en = 0): rules are written or read in three bus
// beats (see cam_filter_unit).
//
// Rule size and count, the ten-cycle extraction, HOLD and match-means-access
// follow the document. The field order inside a rule and the header layout
// (untagged Ethernet II, IPv4 without options) are this design's choices.
module foc_unit #(
  parameter int unsigned DEPTH = 64,
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
  // frame stream
  input  logic [BUS_W-1:0] pkt_data,
  input  logic             pkt_valid,
  input  logic             pkt_sop,
  output logic             hold,
  // decision
  output logic             done,
  output logic             permit,
  output logic             deny,
  output logic [AW-1:0]    location
);
  import rcam_pkg::*;

  localparam int unsigned HB = 10;
  localparam int unsigned HW = HB * BUS_W;
  localparam int unsigned RW = 96;

  logic [HW-1:0] hdr;
  logic          hdr_full;
  logic [RW-1:0] key;
  logic          match;

  beat_collector #(.BEATS(HB)) u_hdr (
    .clk (clk), .rst_n (rst_n), .enable (en),
    .data (pkt_data), .valid (pkt_valid), .sop (pkt_sop),
    .buffer (hdr), .full (hdr_full)
  );

  assign key = {hdr[HW - 1 - 8 * OFF_IP_SRC   -: 32],
                hdr[HW - 1 - 8 * OFF_IP_DST   -: 32],
                hdr[HW - 1 - 8 * OFF_L4_SPORT -: 16],
                hdr[HW - 1 - 8 * OFF_L4_DPORT -: 16]};

  cam_filter_unit #(.WIDTH(RW), .DEPTH(DEPTH), .SUB_W(SUB_W)) u_unit (
    .clk (clk), .rst_n (rst_n), .en (en),
    .req (req), .rdw (rdw), .addr (addr), .wdata (wdata),
    .rdata (rdata), .rvalid (rvalid),
    .key (key), .key_valid (hdr_full),
    .hold (hold), .done (done), .match (match), .location (location)
  );

  assign permit = done && match;
  assign deny   = done && !match;
endmodule
