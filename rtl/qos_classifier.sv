// qos_classifier: QoS packet classification unit of a switch or router port
// with 16 priority queues, built on a 104x16 RCAM.
//
// A flow is identified by the 104-bit key {source IP, source port,
// destination IP, destination port, type of service}; CAM entry i holds the
// flow assigned to queue i. Operation mode (en = 1): the packet's first
// eleven 32-bit beats (`pkt_sop` with the first) are stored in a temporary
// buffer and the key fields are cut out of it. In the next cycle `hold` pauses
// the transfer while the RCAM compares the key; one cycle later `done` pulses
// and a 4-to-16 decoder drives `queue_en`, one-hot: the queue named by the
// matching location, or the lowest-priority queue (LOW_Q) when nothing
// matched (`classified` = 0). Twelve cycles in all: eleven for the transfer,
// one for the compare. Programming mode (en = 0): flows are written or read in
// four bus beats (see cam_filter_unit).
//
// Key fields and size, 16 queues, the decoder, the miss rule and the cycle
// counts follow the document. Which queue is the lowest priority (queue 15
// here, queue 0 the highest) and the header layout are this design's choices.
module qos_classifier #(
  parameter int unsigned NQ    = 16,
  parameter int unsigned LOW_Q = NQ - 1,
  parameter int unsigned SUB_W = rcam_pkg::SUB_W,
  localparam int unsigned BUS_W = rcam_pkg::BUS_W,
  localparam int unsigned AW    = (NQ > 1) ? $clog2(NQ) : 1
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
  // packet stream
  input  logic [BUS_W-1:0] pkt_data,
  input  logic             pkt_valid,
  input  logic             pkt_sop,
  output logic             hold,
  // queue selection
  output logic             done,
  output logic             classified,
  output logic [AW-1:0]    queue_id,
  output logic [NQ-1:0]    queue_en
);
  import rcam_pkg::*;

  localparam int unsigned HB = 11;
  localparam int unsigned HW = HB * BUS_W;
  localparam int unsigned KW = 104;

  logic [HW-1:0] hdr;
  logic          hdr_full;
  logic [KW-1:0] key;
  logic          match;
  logic [AW-1:0] location;

  beat_collector #(.BEATS(HB)) u_hdr (
    .clk (clk), .rst_n (rst_n), .enable (en),
    .data (pkt_data), .valid (pkt_valid), .sop (pkt_sop),
    .buffer (hdr), .full (hdr_full)
  );

  assign key = {hdr[HW - 1 - 8 * OFF_IP_SRC   -: 32],
                hdr[HW - 1 - 8 * OFF_L4_SPORT -: 16],
                hdr[HW - 1 - 8 * OFF_IP_DST   -: 32],
                hdr[HW - 1 - 8 * OFF_L4_DPORT -: 16],
                hdr[HW - 1 - 8 * OFF_IP_TOS   -: 8]};

  cam_filter_unit #(.WIDTH(KW), .DEPTH(NQ), .SUB_W(SUB_W)) u_unit (
    .clk (clk), .rst_n (rst_n), .en (en),
    .req (req), .rdw (rdw), .addr (addr), .wdata (wdata),
    .rdata (rdata), .rvalid (rvalid),
    .key (key), .key_valid (hdr_full),
    .hold (hold), .done (done), .match (match), .location (location)
  );

  // 4-to-16 queue decoder
  assign classified = done && match;
  assign queue_id      = match ? location : AW'(LOW_Q);
  always_comb begin
    queue_en = '0;
    if (done) queue_en[queue_id] = 1'b1;
  end
endmodule
