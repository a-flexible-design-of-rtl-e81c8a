// rcam_configs_tb: runs the array-method CAM in the other configurations the
// comparisons use: 32 words of 8 bits (a single sub-array) and 16 words of 64
// bits split into four 16-bit sub-arrays. For each, every entry is written,
// read back and searched, and keys differing in one sub-array must miss; the
// result must be present one clock after each request.
module rcam_configs_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

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

  // ---- 32 x 8 ---------------------------------------------------------------
  logic       a_reset = 1, a_en = 0, a_rdw = 1;
  logic [4:0] a_addr = 0, a_loc;
  logic [7:0] a_din = 0, a_dout;
  logic       a_match;
  rcam #(.WIDTH(8), .DEPTH(32), .SUB_W(8)) u_a (
    .clk, .rst_n, .reset (a_reset), .en (a_en), .rdw (a_rdw), .addr (a_addr),
    .din (a_din), .dout (a_dout), .match (a_match), .location (a_loc));

  // ---- 64 x 16 in four 16-bit sub-arrays -----------------------------------
  logic        b_reset = 1, b_en = 0, b_rdw = 1;
  logic [3:0]  b_addr = 0, b_loc;
  logic [63:0] b_din = 0, b_dout;
  logic        b_match;
  rcam #(.WIDTH(64), .DEPTH(16), .SUB_W(16)) u_b (
    .clk, .rst_n, .reset (b_reset), .en (b_en), .rdw (b_rdw), .addr (b_addr),
    .din (b_din), .dout (b_dout), .match (b_match), .location (b_loc));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); a_reset = 0; a_en = 0; a_rdw = 0; a_addr = 5'(i); a_din = 8'(i * 7 + 3);
    end
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); a_reset = 0; a_en = 0; a_rdw = 1; a_addr = 5'(i);
      @(negedge clk); a_reset = 1;
      check(a_dout == 8'(i * 7 + 3), "32x8 read");
      @(negedge clk); a_reset = 0; a_en = 1; a_din = 8'(i * 7 + 3);
      @(negedge clk); a_reset = 1; a_en = 0;
      check(a_match && a_loc == 5'(i), "32x8 match");
      begin
        automatic logic [7:0] k = 8'(i * 7 + 3) ^ 8'h80;
        automatic bit m = 0;
        automatic int loc = 0;
        for (int j = 31; j >= 0; j--) if (8'(j * 7 + 3) == k) begin m = 1; loc = j; end
        @(negedge clk); a_reset = 0; a_en = 1; a_din = k;
        @(negedge clk); a_reset = 1; a_en = 0;
        check(a_match == m && (!m || a_loc == 5'(loc)), "32x8 other key");
      end
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); b_reset = 0; b_en = 0; b_rdw = 0; b_addr = 4'(i);
      b_din = {16'(i), 16'h5a5a, 16'(~i), 16'(i * 3)};
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); b_reset = 0; b_en = 0; b_rdw = 1; b_addr = 4'(i);
      @(negedge clk); b_reset = 1;
      check(b_dout == {16'(i), 16'h5a5a, 16'(~i), 16'(i * 3)}, "64x16 read");
      @(negedge clk); b_reset = 0; b_en = 1; b_din = {16'(i), 16'h5a5a, 16'(~i), 16'(i * 3)};
      @(negedge clk); b_reset = 1; b_en = 0;
      check(b_match && b_loc == 4'(i), "64x16 match");
      for (int s = 0; s < 4; s++) begin
        @(negedge clk); b_reset = 0; b_en = 1;
        b_din = {16'(i), 16'h5a5a, 16'(~i), 16'(i * 3)} ^ (64'h1 << (16 * s + 15));
        @(negedge clk); b_reset = 1; b_en = 0;
        check(!b_match, $sformatf("64x16 miss on sub-array %0d", s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
