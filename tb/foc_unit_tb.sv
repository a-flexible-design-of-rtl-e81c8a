// foc_unit_tb: self-checking test of the firewall on chip at its default size
// (64 rules of 96 bits).
//
// Rules {source IP, destination IP, source port, destination port} are written
// in three bus beats each and a sample is read back. Frames (Ethernet II,
// IPv4, TCP/UDP, random payload) are built byte by byte and streamed in 32-bit
// beats, paused while `hold` is high. Their 4-tuples are taken from a rule,
// from a rule with one field changed, or at random. For each frame the
// testbench checks the single `hold`, the eleven-cycle latency (ten header
// beats and one compare) and permit/deny and the rule number against the
// reference rule list.
module foc_unit_tb;
  localparam int unsigned D = 64, AW = $clog2(D);

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, req = 1'b0, rdw = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [31:0] pkt_data = '0;
  logic pkt_valid = 1'b0, pkt_sop = 1'b0;
  logic hold, done, permit, deny;
  logic [AW-1:0] location;
  int checks = 0, failures = 0;
  int n_permit = 0, n_deny = 0;

  logic [95:0] rules [D];

  foc_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic prog_write(input int a, input logic [95:0] r);
    for (int b = 0; b < 3; b++) begin
      @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b0; addr = AW'(a); wdata = r[95 - 32*b -: 32];
    end
    @(negedge clk); req = 1'b0;
    rules[a] = r;
  endtask

  task automatic prog_read(input int a);
    @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b1; addr = AW'(a);
    @(negedge clk); req = 1'b0;
    for (int b = 0; b < 3; b++) begin
      check(rvalid && rdata == rules[a][95 - 32*b -: 32], $sformatf("read %0d beat %0d", a, b));
      @(negedge clk);
    end
  endtask

  // frame bytes: Ethernet II / IPv4 (IHL 5) / TCP or UDP, then payload
  task automatic send_frame(input logic [95:0] t, input int len);
    logic [7:0] f [];
    int nb, b = 0, cyc = 0, holds = 0;
    bit decided = 0, exp = 0; int exp_loc = 0;
    for (int i = D - 1; i >= 0; i--) if (rules[i] == t) begin exp = 1; exp_loc = i; end
    f = new[len];
    foreach (f[i]) f[i] = 8'($urandom);
    f[12] = 8'h08; f[13] = 8'h00; f[14] = 8'h45;
    for (int i = 0; i < 4; i++) begin
      f[26 + i] = t[95 - 8*i -: 8];
      f[30 + i] = t[63 - 8*i -: 8];
    end
    for (int i = 0; i < 2; i++) begin
      f[34 + i] = t[31 - 8*i -: 8];
      f[36 + i] = t[15 - 8*i -: 8];
    end
    nb = (len + 3) / 4;
    en = 1'b1;
    while (!decided || b < nb) begin
      @(negedge clk);
      #1;
      if (hold) holds++;
      if (done) begin
        decided = 1;
        check(cyc == 11, $sformatf("decision after %0d cycles, expected 11", cyc));
        check(permit == exp && deny == !exp, $sformatf("decision for %h", t));
        if (exp) check(location == AW'(exp_loc), "rule number");
        if (permit) n_permit++;
        if (deny) n_deny++;
      end
      if (!hold && b < nb) begin
        pkt_valid = 1'b1; pkt_sop = (b == 0);
        for (int k = 0; k < 4; k++) pkt_data[31 - 8*k -: 8] = (4*b + k < len) ? f[4*b + k] : 8'h00;
        b++;
      end else begin
        pkt_valid = 1'b0; pkt_sop = 1'b0;
      end
      if (b > 0) cyc++;
    end
    @(negedge clk); pkt_valid = 1'b0; pkt_sop = 1'b0;
    check(holds == 1, $sformatf("hold seen %0d times", holds));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < D; i++) prog_write(i, {$urandom, $urandom, 16'($urandom_range(1023)), 16'(80 + i)});
    for (int i = 0; i < D; i += 9) prog_read(i);
    for (int n = 0; n < 250; n++) begin
      automatic logic [95:0] t = rules[$urandom_range(D - 1)];
      case ($urandom_range(2))
        0: ;
        1: t[16 * $urandom_range(5) +: 16] ^= 16'h0101;   // one field changed
        default: t = {$urandom, $urandom, $urandom};
      endcase
      send_frame(t, $urandom_range(64, 120));
    end
    check(n_permit > 0 && n_deny > 0, "both permit and deny seen");
    $display("frames permitted=%0d denied=%0d", n_permit, n_deny);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
