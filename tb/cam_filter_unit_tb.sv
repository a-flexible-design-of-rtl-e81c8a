// cam_filter_unit_tb: self-checking test of the comparison and timing unit,
// run with 80-bit words (three bus beats, the last one half used) and 16
// entries.
//
// Checked against a reference array: a write takes exactly BEATS cycles (a
// match issued right after the last beat already finds the word); a read
// returns BEATS beats on the cycles after the request, zero-padded; a
// compare raises `hold` in its own cycle and `done` one cycle later with the
// right match and location; bus beats in operation mode do not write; a
// partial write followed by more beats keeps beat alignment.
module cam_filter_unit_tb;
  localparam int unsigned W = 80, D = 16, AW = $clog2(D);
  localparam int unsigned BEATS = (W + 31) / 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, req = 1'b0, rdw = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [W-1:0] key = '0;
  logic key_valid = 1'b0;
  logic hold, done, match;
  logic [AW-1:0] location;
  int checks = 0, failures = 0;

  logic [W-1:0] ref_mem [D];
  bit           ref_v   [D];

  cam_filter_unit #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] beat_of(input logic [W-1:0] w, input int b);
    logic [BEATS*32-1:0] p = {w, {(BEATS*32-W){1'b0}}};
    return p[BEATS*32-1-32*b -: 32];
  endfunction

  task automatic write(input int a, input logic [W-1:0] w);
    for (int b = 0; b < BEATS; b++) begin
      @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b0; addr = AW'(a); wdata = beat_of(w, b);
      check(!hold, "no hold in programming mode");
    end
    @(negedge clk); req = 1'b0;
    ref_mem[a] = w; ref_v[a] = 1'b1;
  endtask

  task automatic read_check(input int a);
    @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b1; addr = AW'(a);
    @(negedge clk); req = 1'b0;
    for (int b = 0; b < BEATS; b++) begin
      check(rvalid, $sformatf("rvalid on beat %0d", b));
      check(rdata == beat_of(ref_mem[a], b),
            $sformatf("read %0d beat %0d got %h exp %h", a, b, rdata, beat_of(ref_mem[a], b)));
      @(negedge clk);
    end
    check(!rvalid, "rvalid ends after BEATS cycles");
  endtask

  task automatic compare(input logic [W-1:0] k);
    bit m = 0; int loc = 0;
    for (int i = D - 1; i >= 0; i--) if (ref_v[i] && ref_mem[i] == k) begin m = 1; loc = i; end
    @(negedge clk); en = 1'b1; key = k; key_valid = 1'b1;
    #1 check(hold, "hold during compare cycle");
    @(negedge clk); key_valid = 1'b0;
    #1 check(!hold, "hold released after compare");
    check(done, "done one cycle after compare");
    check(match == m, $sformatf("match %h got %0b exp %0b", k, match, m));
    if (m) check(location == AW'(loc), $sformatf("location got %0d exp %0d", location, loc));
    @(negedge clk);
    check(!done, "done is a single pulse");
  endtask

  initial begin
    for (int i = 0; i < D; i++) begin ref_mem[i] = '0; ref_v[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    compare('0);
    for (int i = 0; i < D; i++) write(i, {$urandom, $urandom, 16'($urandom)});
    for (int i = 0; i < D; i++) read_check(i);
    for (int i = 0; i < D; i++) compare(ref_mem[i]);
    compare(ref_mem[4] ^ 80'h1);
    compare(ref_mem[4] ^ (80'h1 << 79));
    // write whose last beat is followed at once by a compare
    for (int b = 0; b < BEATS; b++) begin
      @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b0; addr = AW'(9);
      wdata = beat_of(80'h0102_0304_0506_0708_090a, b);
    end
    ref_mem[9] = 80'h0102_0304_0506_0708_090a;
    @(negedge clk); req = 1'b0; en = 1'b1; key = ref_mem[9]; key_valid = 1'b1;
    @(negedge clk); key_valid = 1'b0;
    check(done && match && location == AW'(9), "compare right after write finds the new word");
    // duplicate: lowest address wins
    write(12, ref_mem[2]);
    compare(ref_mem[2]);
    write(1, ref_mem[2]);
    compare(ref_mem[2]);
    // beats offered in operation mode are ignored
    for (int b = 0; b < BEATS; b++) begin
      @(negedge clk); en = 1'b1; req = 1'b1; rdw = 1'b0; addr = AW'(0); wdata = 32'hffff_ffff;
    end
    @(negedge clk); req = 1'b0;
    read_check(0);
    compare({W{1'b1}});
    // random mix
    for (int n = 0; n < 200; n++) begin
      automatic int a = $urandom_range(D - 1);
      automatic logic [W-1:0] w = {64'h0, 8'h0, 8'($urandom_range(5))};
      case ($urandom_range(2))
        0: write(a, w);
        1: read_check(a);
        default: compare(w);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
