// ethernet_addr_filter_tb: self-checking test of the Ethernet source-address
// filter at its default size (32 stored MAC addresses).
//
// The administrator side writes 32 addresses (two beats each) and reads some
// back. Then frames of random length are streamed in 32-bit beats; the
// testbench pauses the stream while `hold` is high. For every frame it checks
// the captured destination and source addresses, that `hold` comes exactly
// once, after the three header beats, that the decision arrives four cycles
// after the first beat, and that pass/drop and the location agree with a
// reference list of allowed addresses.
module ethernet_addr_filter_tb;
  localparam int unsigned D = 32, AW = $clog2(D);

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, req = 1'b0, rdw = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [31:0] pkt_data = '0;
  logic pkt_valid = 1'b0, pkt_sop = 1'b0;
  logic hold, done, pass, drop;
  logic [AW-1:0] location;
  logic [47:0] src_mac, dst_mac;
  int checks = 0, failures = 0;
  int n_pass = 0, n_drop = 0;

  logic [47:0] allowed [D];

  ethernet_addr_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic prog_write(input int a, input logic [47:0] mac);
    @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b0; addr = AW'(a); wdata = mac[47:16];
    @(negedge clk); wdata = {mac[15:0], 16'h0};
    @(negedge clk); req = 1'b0;
  endtask

  task automatic prog_read(input int a);
    @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b1; addr = AW'(a);
    @(negedge clk); req = 1'b0;
    check(rvalid && rdata == allowed[a][47:16], $sformatf("read %0d beat 0", a));
    @(negedge clk);
    check(rvalid && rdata == {allowed[a][15:0], 16'h0}, $sformatf("read %0d beat 1", a));
  endtask

  // stream one frame; returns the cycle count from first beat to decision
  task automatic send_frame(input logic [47:0] da, input logic [47:0] sa, input int nbeats);
    logic [95:0] hdr = {da, sa};
    int b = 0, cyc = 0, holds = 0;
    bit decided = 0, exp_pass = 0; int exp_loc = 0;
    for (int i = D - 1; i >= 0; i--) if (allowed[i] == sa) begin exp_pass = 1; exp_loc = i; end
    en = 1'b1;
    while (!decided || b < nbeats) begin
      @(negedge clk);
      #1;
      if (hold) holds++;
      if (done) begin
        decided = 1;
        check(cyc == 4, $sformatf("decision after %0d cycles, expected 4", cyc));
        check(pass == exp_pass && drop == !exp_pass, $sformatf("decision for %h", sa));
        if (exp_pass) check(location == AW'(exp_loc), "location of matching entry");
        check(src_mac == sa && dst_mac == da, "captured address buffers");
        if (pass) n_pass++; else n_drop++;
      end
      if (!hold && b < nbeats) begin
        pkt_valid = 1'b1; pkt_sop = (b == 0);
        pkt_data = (b < 3) ? hdr[95 - 32*b -: 32] : $urandom;
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
    for (int i = 0; i < D; i++) begin
      allowed[i] = {$urandom, 16'($urandom)};
      prog_write(i, allowed[i]);
    end
    allowed[17] = allowed[5];
    prog_write(17, allowed[17]);
    for (int i = 0; i < D; i += 3) prog_read(i);
    for (int n = 0; n < 200; n++) begin
      automatic logic [47:0] sa = ($urandom_range(1)) ? allowed[$urandom_range(D - 1)] : {$urandom, 16'($urandom)};
      send_frame({$urandom, 16'($urandom)}, sa, $urandom_range(3, 20));
      repeat ($urandom_range(2)) @(negedge clk);
    end
    check(n_pass > 0 && n_drop > 0, "both pass and drop decisions seen");
    $display("frames passed=%0d dropped=%0d", n_pass, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
