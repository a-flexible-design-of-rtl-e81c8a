// rcam_tb: self-checking test of the array-method CAM at its default size
// (48-bit words, 32 deep, 8-bit sub-arrays).
//
// A reference model (an array plus valid bits) is kept in the testbench.
// Checked: words never written do not match; one-cycle write, read and match
// (results sampled one clock after the request); lowest address wins on
// duplicates; a key that differs in a single bit of any sub-array misses;
// with `reset` = 1 nothing is written and outputs hold; rewrite of an entry.
module rcam_tb;
  localparam int unsigned W = 48, D = 32, AW = $clog2(D);

  logic clk = 1'b0, rst_n = 1'b0;
  logic reset = 1'b1, en = 1'b0, rdw = 1'b1;
  logic [AW-1:0] addr = '0;
  logic [W-1:0]  din = '0, dout;
  logic match;
  logic [AW-1:0] location;
  int checks = 0, failures = 0;

  logic [W-1:0] ref_mem [D];
  logic         ref_v   [D];

  rcam #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle();
    @(negedge clk); reset = 1'b1;
  endtask

  task automatic write(input logic [AW-1:0] a, input logic [W-1:0] d);
    @(negedge clk); reset = 1'b0; en = 1'b0; rdw = 1'b0; addr = a; din = d;
    @(negedge clk); reset = 1'b1;
    ref_mem[a] = d; ref_v[a] = 1'b1;
  endtask

  task automatic read_check(input logic [AW-1:0] a);
    @(negedge clk); reset = 1'b0; en = 1'b0; rdw = 1'b1; addr = a;
    @(negedge clk); reset = 1'b1;
    check(dout == ref_mem[a], $sformatf("read %0d got %h exp %h", a, dout, ref_mem[a]));
  endtask

  // expected result from the model
  task automatic model(input logic [W-1:0] k, output bit m, output int loc);
    m = 0; loc = 0;
    for (int i = D - 1; i >= 0; i--) if (ref_v[i] && ref_mem[i] == k) begin m = 1; loc = i; end
  endtask

  task automatic match_check(input logic [W-1:0] k);
    bit m; int loc;
    model(k, m, loc);
    @(negedge clk); reset = 1'b0; en = 1'b1; din = k;
    @(negedge clk); reset = 1'b1; en = 1'b0;
    // result registered at the single edge between the two negedges
    check(match == m, $sformatf("match for %h got %0b exp %0b", k, match, m));
    if (m) check(location == AW'(loc), $sformatf("location for %h got %0d exp %0d", k, location, loc));
  endtask

  initial begin
    for (int i = 0; i < D; i++) begin ref_mem[i] = '0; ref_v[i] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // empty CAM: nothing matches, not even zero
    match_check('0);
    match_check(48'h1234_5678_9abc);
    // fill with distinct random words
    for (int i = 0; i < D; i++) write(AW'(i), {$urandom, $urandom} & 48'hffff_ffff_ffff);
    for (int i = 0; i < D; i++) read_check(AW'(i));
    for (int i = 0; i < D; i++) match_check(ref_mem[i]);
    // single-bit differences in every sub-array position miss
    for (int b = 0; b < W; b += 5) match_check(ref_mem[7] ^ (48'h1 << b));
    // a difference confined to one sub-array (here the top one) must miss
    for (int i = 0; i < D; i++) match_check(ref_mem[i] ^ (48'h1 << (40 + i % 8)));
    // duplicates: lowest address wins
    write(AW'(20), ref_mem[3]);
    write(AW'(25), ref_mem[3]);
    match_check(ref_mem[3]);
    write(AW'(3), 48'hdead_beef_0001);
    match_check(ref_mem[20]);
    match_check(48'hdead_beef_0001);
    // inactive CAM: a write request with reset=1 changes nothing, outputs hold
    @(negedge clk); reset = 1'b1; en = 1'b0; rdw = 1'b0; addr = AW'(5); din = 48'hffff_0000_ffff;
    @(negedge clk);
    check(match == 1'b1, "outputs hold while inactive");
    read_check(AW'(5));
    match_check(48'hffff_0000_ffff);
    // random traffic
    for (int n = 0; n < 300; n++) begin
      automatic int a = $urandom_range(D - 1);
      case ($urandom_range(2))
        0: write(AW'(a), {16'h0, 16'($urandom_range(3)), 16'($urandom_range(3))});
        1: read_check(AW'(a));
        default: match_check({16'h0, 16'($urandom_range(3)), 16'($urandom_range(3))});
      endcase
    end
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
