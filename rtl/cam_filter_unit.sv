// cam_filter_unit: comparison and timing unit around an RCAM.
//
// This is the part shared by the address filters, the firewall, the QoS
// classifier and the NIDS search unit. It has two modes, chosen by `en`:
//
// Programming mode (en = 0). The host moves one CAM word over the 32-bit bus
// in BEATS = ceil(WIDTH/32) beats, most significant first, with `addr` and
// `rdw` held and `req` high on each beat.
//   write (rdw = 0): beats are shifted into a temporary word buffer; with the
//     last beat the assembled word is written into the CAM in the same clock,
//     so a write takes BEATS cycles.
//   read (rdw = 1): one `req` cycle reads the word out of the CAM; in the next
//     BEATS cycles the word is returned on `rdata` with `rvalid`, most
//     significant beat first. The host must not issue `req` during that time.
// Operation mode (en = 1). A caller that has gathered a search key raises
// `key_valid` for one cycle. In that cycle `hold` is high (the packet source
// must pause) and the CAM compares the key with all its words. In the next
// cycle `done` pulses, `match` tells whether the key was found and
// `location` where. Outside these operations the CAM is kept inactive
// (its `reset` pin high).
//
// The two modes, the 32-bit bus, the word buffer, HOLD and the one-cycle match
// follow the RCAM network units; the req/rvalid handshake, the extra access
// cycle of a read and the beat order are this design's choices.
module cam_filter_unit #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned SUB_W = rcam_pkg::SUB_W,
  localparam int unsigned BUS_W = rcam_pkg::BUS_W,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BEATS = rcam_pkg::beats_for(WIDTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,         // '1' operation (match), '0' programming
  // programming bus
  input  logic             req,
  input  logic             rdw,        // '1' read, '0' write
  input  logic [AW-1:0]    addr,
  input  logic [BUS_W-1:0] wdata,
  output logic [BUS_W-1:0] rdata,
  output logic             rvalid,
  // operation mode
  input  logic [WIDTH-1:0] key,
  input  logic             key_valid,
  output logic             hold,
  output logic             done,
  output logic             match,
  output logic [AW-1:0]    location
);
  localparam int unsigned BW = BEATS * BUS_W;
  localparam int unsigned CW = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [BW-1:0]    wbuf;       // temporary word buffer (write path)
  logic [BW-1:0]    wbuf_next;
  logic [CW-1:0]    wcnt;       // write beats received
  logic             rd_busy;
  logic [CW-1:0]    rcnt;       // read beat being returned
  logic             cmp_q;      // a compare was issued last cycle
  logic             do_cmp, do_rd, do_wr;

  logic             cam_reset, cam_en, cam_rdw;
  logic [WIDTH-1:0] cam_din, cam_dout;
  logic [BW-1:0]    rd_word;

  assign wbuf_next = (wbuf << BUS_W) | BW'(wdata);

  assign do_cmp = en && key_valid;
  assign do_rd  = !en && req && rdw && !rd_busy;
  assign do_wr  = !en && req && !rdw && (wcnt == CW'(BEATS - 1));

  always_comb begin
    cam_reset = 1'b1;
    cam_en    = 1'b0;
    cam_rdw   = 1'b1;
    cam_din   = key;
    if (do_cmp) begin
      cam_reset = 1'b0;
      cam_en    = 1'b1;
    end else if (do_rd) begin
      cam_reset = 1'b0;
    end else if (do_wr) begin
      cam_reset = 1'b0;
      cam_rdw   = 1'b0;
      cam_din   = wbuf_next[BW-1 -: WIDTH];
    end
  end

  rcam #(.WIDTH(WIDTH), .DEPTH(DEPTH), .SUB_W(SUB_W)) u_cam (
    .clk      (clk),
    .rst_n    (rst_n),
    .reset    (cam_reset),
    .en       (cam_en),
    .rdw      (cam_rdw),
    .addr     (addr),
    .din      (cam_din),
    .dout     (cam_dout),
    .match    (match),
    .location (location)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbuf    <= '0;
      wcnt    <= '0;
      rd_busy <= 1'b0;
      rcnt    <= '0;
      cmp_q   <= 1'b0;
    end else begin
      cmp_q <= do_cmp;
      if (!en && req && !rdw) begin
        wbuf <= wbuf_next;
        wcnt <= (wcnt == CW'(BEATS - 1)) ? '0 : wcnt + CW'(1);
      end
      if (do_rd) begin
        rd_busy <= 1'b1;
        rcnt    <= '0;
      end else if (rd_busy) begin
        rcnt <= rcnt + CW'(1);
        if (rcnt == CW'(BEATS - 1)) rd_busy <= 1'b0;
      end
    end
  end

  assign rd_word = BW'(cam_dout) << (BW - WIDTH);
  assign rdata   = rd_busy ? rd_word[BW - 1 - int'(rcnt) * BUS_W -: BUS_W] : '0;
  assign rvalid  = rd_busy;
  assign hold    = do_cmp;
  assign done    = cmp_q;

  a_no_req_during_read: assert property (@(posedge clk) disable iff (!rst_n)
    rd_busy |-> !req)
    else $error("cam_filter_unit: request while a read is being returned");
endmodule
