// rcam: reconfigurable content addressable memory built with the array method.
//
// The stored words live in an array; on every clock edge at which the unit is
// active (`reset` = 0) exactly one operation takes place, chosen by the pins
// of the classic RCAM pin-out:
//   en = 1            match: `din` is compared with every valid word at once;
//                     `match` and `location` (lowest matching address) are
//                     registered at this edge, so they are valid one clock
//                     after the request.
//   en = 0, rdw = 1   read: the word at `addr` is registered on `dout`.
//   en = 0, rdw = 0   write: `din` is stored at `addr` and the word is valid.
// With `reset` = 1 the CAM is inactive: nothing is stored and the outputs hold
// their last values (`reset` deactivates, it does not clear). The width and
// depth are the only settings; the array is cut into sub-arrays of SUB_W-bit
// word slices that are compared in parallel and ANDed per word.
//
// Design choices beyond the pin-out: the data pins are split into `din` and
// `dout` instead of one bidirectional bus; `rst_n` is an extra power-on reset
// that clears the outputs and the per-word valid bits, so that words never
// written cannot match; among several matches the lowest address wins.
module rcam #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned SUB_W = rcam_pkg::SUB_W,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NSUB = (WIDTH + SUB_W - 1) / SUB_W
) (
  input  logic             clk,
  input  logic             rst_n,     // power-on reset (design choice)
  input  logic             reset,     // '1': CAM not active, '0': active
  input  logic             en,        // '1': match mode, '0': read/write mode
  input  logic             rdw,       // '1': read, '0': write
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             match,
  output logic [AW-1:0]    location
);
  logic                    we;
  logic [DEPTH-1:0]        valid;
  logic [NSUB-1:0][DEPTH-1:0] sub_hit;
  logic [DEPTH-1:0]        word_hit;
  logic [WIDTH-1:0]        rd_word;
  logic                    any_hit;
  logic [AW-1:0]           hit_idx;

  assign we = !reset && !en && !rdw;

  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    localparam int unsigned LO = s * SUB_W;
    localparam int unsigned SW = (s == NSUB - 1) ? WIDTH - LO : SUB_W;
    rcam_subarray #(.SW(SW), .DEPTH(DEPTH)) u_sub (
      .clk   (clk),
      .we    (we),
      .addr  (addr),
      .wdata (din[LO +: SW]),
      .key   (din[LO +: SW]),
      .rdata (rd_word[LO +: SW]),
      .hit   (sub_hit[s])
    );
  end

  always_comb begin
    word_hit = valid;
    for (int s = 0; s < NSUB; s++) word_hit &= sub_hit[s];
  end

  prio_enc #(.N(DEPTH)) u_enc (.req(word_hit), .any(any_hit), .idx(hit_idx));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid    <= '0;
      match    <= 1'b0;
      location <= '0;
      dout     <= '0;
    end else if (!reset) begin
      if (en) begin
        match    <= any_hit;
        location <= hit_idx;
      end else if (rdw) begin
        dout <= rd_word;
      end else begin
        valid[addr] <= 1'b1;
      end
    end
  end

  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (!reset && !en) |-> (int'(addr) < int'(DEPTH)))
    else $error("rcam: read/write address out of range");
endmodule
