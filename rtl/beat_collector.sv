// beat_collector: temporary buffer that captures the first BEATS beats of a
// packet from the 32-bit bus.
//
// A beat with `sop` starts a packet; it and the following BEATS-1 valid beats
// are shifted into `buffer`, first beat in the most significant bits. The
// clock edge that stores the last of them raises `full` for one cycle; the
// buffer then holds until the next `sop`. Further beats of the same packet are
// ignored. `enable` low (the unit in programming mode) stops capture.
module beat_collector #(
  parameter int unsigned BEATS = 3,
  localparam int unsigned BUS_W = rcam_pkg::BUS_W,
  localparam int unsigned CW = $clog2(BEATS + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,
  input  logic [BUS_W-1:0]       data,
  input  logic                   valid,
  input  logic                   sop,
  output logic [BEATS*BUS_W-1:0] buffer,
  output logic                   full
);
  localparam int unsigned BW = BEATS * BUS_W;
  logic [CW-1:0] cnt;   // beats captured of the current packet

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= CW'(BEATS);
      full   <= 1'b0;
      buffer <= '0;
    end else begin
      full <= 1'b0;
      if (enable && valid && (sop || cnt < CW'(BEATS))) begin
        buffer <= (buffer << BUS_W) | BW'(data);
        cnt    <= sop ? CW'(1) : cnt + CW'(1);
        full   <= sop ? (BEATS == 1) : (cnt == CW'(BEATS - 1));
      end
    end
  end
endmodule
