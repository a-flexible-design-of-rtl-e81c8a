// qos_classifier_tb: self-checking test of the QoS packet classifier at its
// default size (16 flows, 16 queues).
//
// Flow keys {source IP, source port, destination IP, destination port, TOS}
// are written in four bus beats each and a sample is read back. Packets
// (Ethernet II, IPv4, TCP/UDP) are streamed in 32-bit beats, paused while
// `hold` is high; their flow is a stored one, a stored one with only the TOS
// changed, or random. For each packet the testbench checks the single
// `hold`, the twelve-cycle latency (eleven beats and one compare) and that
// exactly the expected queue is enabled: the matching entry's queue, or the
// lowest-priority queue 15 on a miss.
module qos_classifier_tb;
  localparam int unsigned NQ = 16, AW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, req = 1'b0, rdw = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [31:0] pkt_data = '0;
  logic pkt_valid = 1'b0, pkt_sop = 1'b0;
  logic hold, done, classified;
  logic [AW-1:0] queue_id;
  logic [NQ-1:0] queue_en;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;

  logic [103:0] flows [NQ];

  qos_classifier dut (.*);

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

  function automatic logic [31:0] beat_of(input logic [103:0] k, input int b);
    logic [127:0] p = {k, 24'h0};
    return p[127 - 32*b -: 32];
  endfunction

  task automatic prog_write(input int a, input logic [103:0] k);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b0; addr = AW'(a); wdata = beat_of(k, b);
    end
    @(negedge clk); req = 1'b0;
    flows[a] = k;
  endtask

  task automatic prog_read(input int a);
    @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b1; addr = AW'(a);
    @(negedge clk); req = 1'b0;
    for (int b = 0; b < 4; b++) begin
      check(rvalid && rdata == beat_of(flows[a], b), $sformatf("read %0d beat %0d", a, b));
      @(negedge clk);
    end
  endtask

  task automatic send_packet(input logic [103:0] k, input int len);
    logic [7:0] f [];
    int nb, b = 0, cyc = 0, holds = 0, exp_q = NQ - 1;
    bit decided = 0, exp = 0;
    for (int i = NQ - 1; i >= 0; i--) if (flows[i] == k) begin exp = 1; exp_q = i; end
    f = new[len];
    foreach (f[i]) f[i] = 8'($urandom);
    f[12] = 8'h08; f[13] = 8'h00; f[14] = 8'h45;
    f[15] = k[7:0];
    for (int i = 0; i < 4; i++) begin
      f[26 + i] = k[103 - 8*i -: 8];
      f[30 + i] = k[55 - 8*i -: 8];
    end
    for (int i = 0; i < 2; i++) begin
      f[34 + i] = k[71 - 8*i -: 8];
      f[36 + i] = k[23 - 8*i -: 8];
    end
    nb = (len + 3) / 4;
    en = 1'b1;
    while (!decided || b < nb) begin
      @(negedge clk);
      #1;
      if (hold) holds++;
      check(done || queue_en == '0, "no queue enabled outside a decision");
      if (done) begin
        decided = 1;
        check(cyc == 12, $sformatf("decision after %0d cycles, expected 12", cyc));
        check(classified == exp, $sformatf("classified for %h", k));
        check(queue_en == NQ'(1) << exp_q && queue_id == AW'(exp_q),
              $sformatf("queue got %b exp %0d", queue_en, exp_q));
        if (classified) n_hit++; else n_miss++;
      end
      if (!hold && b < nb) begin
        pkt_valid = 1'b1; pkt_sop = (b == 0);
        for (int j = 0; j < 4; j++) pkt_data[31 - 8*j -: 8] = (4*b + j < len) ? f[4*b + j] : 8'h00;
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
    for (int i = 0; i < NQ; i++)
      prog_write(i, {$urandom, 16'($urandom), $urandom, 16'(5000 + i), 8'(i << 2)});
    for (int i = 0; i < NQ; i += 3) prog_read(i);
    for (int n = 0; n < 250; n++) begin
      automatic logic [103:0] k = flows[$urandom_range(NQ - 1)];
      case ($urandom_range(2))
        0: ;
        1: k[7:0] ^= 8'h10;                                 // same flow, other TOS
        default: k = {$urandom, $urandom, $urandom, 8'($urandom)};
      endcase
      send_packet(k, $urandom_range(64, 100));
    end
    check(n_hit > 0 && n_miss > 0, "both classified and default-queue packets seen");
    $display("packets classified=%0d default=%0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
