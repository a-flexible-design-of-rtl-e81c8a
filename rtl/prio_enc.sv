// prio_enc: priority encoder for the CAM match lines.
//
// Returns the index of the lowest-numbered set bit of `req` (the lowest CAM
// address has the highest priority) and `any` when at least one bit is set.
// Purely combinational. The priority order is this design's choice; the
// routing unit only asks for "the highest priority match".
module prio_enc #(
  parameter int unsigned N = 32,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  output logic          any,
  output logic [IW-1:0] idx
);
  always_comb begin
    any = 1'b0;
    idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        any = 1'b1;
        idx = IW'(i);
      end
    end
  end
endmodule
