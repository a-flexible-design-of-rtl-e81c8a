// wlan_mac_filter_tb: self-checking test of the access-point MAC filter at its
// default size (128 permitted client addresses).
//
// All 128 addresses are written over the 32-bit bus (two beats each, the
// document's two-cycle programming) and a sample is read back. Then source
// addresses of RTS frames arrive in two beats; for each, the testbench checks
// that `hold` is raised once, that the decision comes three cycles after the
// first beat, and that accept/reject and the location agree with the
// reference list. Rewriting an entry revokes the old address.
module wlan_mac_filter_tb;
  localparam int unsigned D = 128, AW = $clog2(D);

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, req = 1'b0, rdw = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [31:0] sa_data = '0;
  logic sa_valid = 1'b0, sa_sop = 1'b0;
  logic hold, done, accept, reject;
  logic [AW-1:0] location;
  int checks = 0, failures = 0;
  int n_acc = 0, n_rej = 0;

  logic [47:0] allowed [D];

  wlan_mac_filter dut (.*);

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
    int cyc = 0;
    @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b0; addr = AW'(a); wdata = mac[47:16];
    @(negedge clk); wdata = {mac[15:0], 16'h0};
    @(negedge clk); req = 1'b0;
    allowed[a] = mac;
  endtask

  task automatic prog_read(input int a);
    @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b1; addr = AW'(a);
    @(negedge clk); req = 1'b0;
    check(rvalid && rdata == allowed[a][47:16], $sformatf("read %0d beat 0", a));
    @(negedge clk);
    check(rvalid && rdata == {allowed[a][15:0], 16'h0}, $sformatf("read %0d beat 1", a));
  endtask

  task automatic check_client(input logic [47:0] sa);
    bit exp = 0; int exp_loc = 0, holds = 0, cyc = 0;
    for (int i = D - 1; i >= 0; i--) if (allowed[i] == sa) begin exp = 1; exp_loc = i; end
    @(negedge clk); en = 1'b1; sa_valid = 1'b1; sa_sop = 1'b1; sa_data = sa[47:16];
    @(negedge clk); sa_sop = 1'b0; sa_data = {sa[15:0], 16'h0};
    @(negedge clk); sa_valid = 1'b0; sa_data = $urandom;
    cyc = 2;
    while (!done && cyc < 10) begin
      #1 if (hold) holds++;
      @(negedge clk); cyc++;
    end
    check(cyc == 3, $sformatf("decision after %0d cycles, expected 3", cyc));
    check(holds == 1, $sformatf("hold seen %0d times", holds));
    check(accept == exp && reject == !exp, $sformatf("decision for %h", sa));
    if (exp) check(location == AW'(exp_loc), "location of matching entry");
    if (accept) n_acc++;
    if (reject) n_rej++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < D; i++) prog_write(i, {$urandom, 16'($urandom)});
    for (int i = 0; i < D; i += 7) prog_read(i);
    for (int n = 0; n < 300; n++) begin
      automatic logic [47:0] sa = ($urandom_range(1)) ? allowed[$urandom_range(D - 1)]
                                                      : {$urandom, 16'($urandom)};
      check_client(sa);
    end
    begin
      automatic logic [47:0] old = allowed[40];
      prog_write(40, 48'h0200_0000_0001);
      check_client(old);
      check(reject, "rewritten entry revokes old address");
      check_client(48'h0200_0000_0001);
    end
    check(n_acc > 0 && n_rej > 0, "both accept and reject seen");
    $display("clients accepted=%0d rejected=%0d", n_acc, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
