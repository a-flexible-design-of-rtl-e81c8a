// nids_search_unit: keyword search engine of a network intrusion detection
// system, built on an 80x64 RCAM holding attack-signature words.
//
// Operation mode (en = 1): the extraction logic in front hands over each
// candidate word of a packet (up to 10 characters, 80 bits) in three 32-bit
// beats, `word_sop` with the first; the word is stored in a 10-byte buffer
// (bits 95:16 of the three beats, first character most significant). In the
// next cycle the RCAM compares it with every signature and one cycle later
// `done` pulses with `alert` (signature found, `location` names it) or
// `clean`. A word takes four cycles: three to transfer, one to match.
// Programming mode (en = 0): signatures are written or read in three bus
// beats (see cam_filter_unit).
//
// Sizes and cycle counts follow the document; character order and padding of
// shorter words (with zero bytes) are this design's choices.
module nids_search_unit #(
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
  // candidate words from the extraction units
  input  logic [BUS_W-1:0] word_data,
  input  logic             word_valid,
  input  logic             word_sop,
  output logic             hold,
  // result
  output logic             done,
  output logic             alert,
  output logic             clean,
  output logic [AW-1:0]    location
);
  localparam int unsigned WW = 80;
  localparam int unsigned HB = rcam_pkg::beats_for(WW);
  localparam int unsigned HW = HB * BUS_W;

  logic [HW-1:0] wbuf;
  logic          wfull;
  logic          match;

  beat_collector #(.BEATS(HB)) u_word (
    .clk (clk), .rst_n (rst_n), .enable (en),
    .data (word_data), .valid (word_valid), .sop (word_sop),
    .buffer (wbuf), .full (wfull)
  );

  cam_filter_unit #(.WIDTH(WW), .DEPTH(DEPTH), .SUB_W(SUB_W)) u_unit (
    .clk (clk), .rst_n (rst_n), .en (en),
    .req (req), .rdw (rdw), .addr (addr), .wdata (wdata),
    .rdata (rdata), .rvalid (rvalid),
    .key (wbuf[HW-1 -: WW]), .key_valid (wfull),
    .hold (hold), .done (done), .match (match), .location (location)
  );

  assign alert = done && match;
  assign clean = done && !match;
endmodule
