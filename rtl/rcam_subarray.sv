// rcam_subarray: one sub-array of the array-method CAM.
//
// Holds a SW-bit slice of each of the DEPTH words. On a clock edge with `we`
// the slice at `addr` is replaced by `wdata`. Combinationally it compares the
// key slice with every stored slice (`hit`, one bit per word) and presents the
// slice at `addr` for reads. The parent CAM ANDs the hit vectors of all its
// sub-arrays; splitting the word this way shortens the compare path, which is
// the parallel-processing arrangement of the array method. The storage is a
// plain array with no reset: the parent keeps per-word valid bits.
module rcam_subarray #(
  parameter int unsigned SW    = 8,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [SW-1:0]    wdata,
  input  logic [SW-1:0]    key,
  output logic [SW-1:0]    rdata,
  output logic [DEPTH-1:0] hit
);
  logic [SW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  always_comb begin
    for (int j = 0; j < DEPTH; j++) hit[j] = (mem[j] == key);
  end

  assign rdata = mem[addr];
endmodule
