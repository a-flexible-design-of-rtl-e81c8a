// route_search_unit: routing table search unit, a 32x256 RCAM holding the
// destination network addresses plus an associated RAM holding, per entry,
// the next-hop address, hop count and interface number.
//
// Search (en = 1): the router fabric presents the destination IP of a packet
// with `dst_valid` (no temporary buffer). That cycle the RCAM compares it with
// all 256 entries. On a match the next cycle reads the RAM at the matching
// location; the RAM answers two cycles later. Three cycles after the request
// `result_valid` pulses with either `found` and the entry (next hop, hop
// count, interface) or `not_found` ("destination not found" for the router's
// controller; the entry outputs are then zero instead of floating).
// Programming (en = 0, `req` on each beat, `addr` held): three beats store one
// route - beat 1 the destination IP into the RCAM, beat 2 the next hop, beat 3
// {hop count, interface, 16'b0} into the RAM with the third beat.
//
// The sizes, the CAM+RAM split, the 3-cycle search and the 3-cycle store
// follow the document. Lowest address wins among several matches, there is no
// read-back of routes, and the beat layout of a store is this design's choice.
module route_search_unit #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned SUB_W = rcam_pkg::SUB_W,
  localparam int unsigned BUS_W = rcam_pkg::BUS_W,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  // programming bus
  input  logic             req,
  input  logic [AW-1:0]    addr,
  input  logic [BUS_W-1:0] wdata,
  // search
  input  logic [31:0]      dst_ip,
  input  logic             dst_valid,
  output logic             result_valid,
  output logic             found,
  output logic             not_found,
  output logic [31:0]      next_hop,
  output logic [7:0]       hop_count,
  output logic [7:0]       iface
);
  import rcam_pkg::*;

  logic [1:0]     pcnt;          // programming beat 0..2
  logic [31:0]    nh_buf;        // next hop held between beats 2 and 3
  logic           cam_reset, cam_en, cam_rdw;
  logic [31:0]    cam_din;
  logic           cam_match;
  logic [AW-1:0]  cam_loc;
  logic           cmp_q;         // CAM result valid this cycle
  logic [1:0]     miss_pipe;     // carries a miss alongside the RAM read
  logic           ram_we;
  route_entry_t   ram_wdata, ram_rdata;
  logic           ram_valid;

  // CAM control: compare in search mode, write on the first programming beat
  always_comb begin
    cam_reset = 1'b1;
    cam_en    = 1'b0;
    cam_rdw   = 1'b1;
    cam_din   = dst_ip;
    if (en && dst_valid) begin
      cam_reset = 1'b0;
      cam_en    = 1'b1;
    end else if (!en && req && pcnt == 2'd0) begin
      cam_reset = 1'b0;
      cam_rdw   = 1'b0;
      cam_din   = wdata;
    end
  end

  rcam #(.WIDTH(32), .DEPTH(DEPTH), .SUB_W(SUB_W)) u_cam (
    .clk (clk), .rst_n (rst_n), .reset (cam_reset), .en (cam_en),
    .rdw (cam_rdw), .addr (addr), .din (cam_din), .dout (),
    .match (cam_match), .location (cam_loc)
  );

  assign ram_we    = !en && req && pcnt == 2'd2;
  assign ram_wdata = '{next_hop: nh_buf, hop_count: wdata[31:24], iface: wdata[23:16]};

  assoc_ram #(.DEPTH(DEPTH)) u_ram (
    .clk (clk), .rst_n (rst_n),
    .we (ram_we), .waddr (addr), .wdata (ram_wdata),
    .rd_en (cmp_q && cam_match), .raddr (cam_loc),
    .rdata (ram_rdata), .rd_valid (ram_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pcnt      <= '0;
      nh_buf    <= '0;
      cmp_q     <= 1'b0;
      miss_pipe <= '0;
    end else begin
      cmp_q     <= en && dst_valid;
      miss_pipe <= {miss_pipe[0], cmp_q && !cam_match};
      if (!en && req) begin
        pcnt <= (pcnt == 2'd2) ? 2'd0 : pcnt + 2'd1;
        if (pcnt == 2'd1) nh_buf <= wdata;
      end
    end
  end

  assign found        = ram_valid;
  assign not_found    = miss_pipe[1];
  assign result_valid = found || not_found;
  assign next_hop     = found ? ram_rdata.next_hop  : '0;
  assign hop_count    = found ? ram_rdata.hop_count : '0;
  assign iface        = found ? ram_rdata.iface     : '0;
endmodule
