// route_search_unit_tb: self-checking test of the routing table search unit
// at its default size (256 routes).
//
// All 256 routes are stored with the three-beat programming sequence
// (destination IP, next hop, {hop count, interface}). Then destination
// addresses - stored ones and unknown ones - are searched, one at a time and
// also back to back, one per cycle. For every search the testbench checks that
// exactly one result appears three cycles after the request, in order, with
// found/not_found and the next hop, hop count and interface of the reference
// table (lowest entry on duplicates, zero on a miss).
module route_search_unit_tb;
  import rcam_pkg::*;
  localparam int unsigned D = 256, AW = $clog2(D);

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, req = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0;
  logic [31:0] dst_ip = '0;
  logic dst_valid = 1'b0;
  logic result_valid, found, not_found;
  logic [31:0] next_hop;
  logic [7:0] hop_count, iface;
  int checks = 0, failures = 0;
  int n_found = 0, n_miss = 0;

  logic [31:0]  ips [D];
  route_entry_t tbl [D];

  // expected results, queued at request time
  bit           exp_f [$];
  route_entry_t exp_e [$];
  int           exp_t [$];
  int           cycle = 0;

  route_search_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

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

  task automatic store(input int a, input logic [31:0] ip, input route_entry_t e);
    @(negedge clk); en = 1'b0; req = 1'b1; addr = AW'(a); wdata = ip;
    @(negedge clk); wdata = e.next_hop;
    @(negedge clk); wdata = {e.hop_count, e.iface, 16'h0};
    @(negedge clk); req = 1'b0;
    ips[a] = ip; tbl[a] = e;
  endtask

  // checker: every result must match the oldest outstanding request
  always @(negedge clk) begin
    #1;
    if (rst_n && result_valid) begin
      if (exp_f.size() == 0) check(0, "result without request");
      else begin
        automatic bit f = exp_f.pop_front();
        automatic route_entry_t e = exp_e.pop_front();
        automatic int t = exp_t.pop_front();
        check(cycle - t == 3, $sformatf("routing decision after %0d cycles, expected 3", cycle - t));
        check(found == f && not_found == !f, "found / not found");
        if (f) check(next_hop == e.next_hop && hop_count == e.hop_count && iface == e.iface,
                     $sformatf("route entry got %h/%0d/%0d", next_hop, hop_count, iface));
        else   check(next_hop == '0 && hop_count == '0 && iface == '0, "zero entry on a miss");
        if (f) n_found++; else n_miss++;
      end
    end
  end

  task automatic issue(input logic [31:0] ip);
    bit f = 0; int loc = 0;
    for (int i = D - 1; i >= 0; i--) if (ips[i] == ip) begin f = 1; loc = i; end
    @(negedge clk); en = 1'b1; dst_ip = ip; dst_valid = 1'b1;
    exp_f.push_back(f); exp_e.push_back(tbl[loc]); exp_t.push_back(cycle);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < D; i++)
      store(i, {8'd10, 8'(i), 8'($urandom), 8'd1},
            '{next_hop: $urandom, hop_count: 8'($urandom_range(1, 15)), iface: 8'($urandom_range(7))});
    // duplicate destination: the lower entry wins
    store(200, ips[7], '{next_hop: 32'hc0a8_0001, hop_count: 8'd3, iface: 8'd2});
    // isolated searches
    for (int n = 0; n < 100; n++) begin
      issue(($urandom_range(3) != 0) ? ips[$urandom_range(D - 1)] : $urandom);
      @(negedge clk); dst_valid = 1'b0;
      repeat (4) @(negedge clk);
    end
    // back-to-back searches, one per cycle
    for (int n = 0; n < 200; n++) issue(($urandom_range(3) != 0) ? ips[$urandom_range(D - 1)] : $urandom);
    @(negedge clk); dst_valid = 1'b0;
    repeat (6) @(negedge clk);
    check(exp_f.size() == 0, "every search answered");
    check(n_found > 0 && n_miss > 0, "both found and not found seen");
    $display("searches found=%0d not_found=%0d", n_found, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
