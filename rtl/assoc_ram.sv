// assoc_ram: associated data RAM of the routing table search unit.
//
// DEPTH entries of route_entry_t (next hop, hop count, interface number). A
// write stores `wdata` at `waddr` on the clock edge. A read is pipelined over
// two clocks: the edge after `rd_en` registers the array output, the next
// edge registers it again onto `rdata`, with `rd_valid` alongside; so data is
// visible two cycles after the request, matching the two-cycle RAM response
// of the routing unit. The two register stages are this design's way of
// getting that latency; the array has no reset.
module assoc_ram #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  rcam_pkg::route_entry_t wdata,
  input  logic                   rd_en,
  input  logic [AW-1:0]          raddr,
  output rcam_pkg::route_entry_t rdata,
  output logic                   rd_valid
);
  rcam_pkg::route_entry_t mem [DEPTH];
  rcam_pkg::route_entry_t stage;
  logic                   stage_v;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    stage <= mem[raddr];
    rdata <= stage;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage_v  <= 1'b0;
      rd_valid <= 1'b0;
    end else begin
      stage_v  <= rd_en;
      rd_valid <= stage_v;
    end
  end
endmodule
