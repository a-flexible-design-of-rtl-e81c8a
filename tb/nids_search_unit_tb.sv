// nids_search_unit_tb: self-checking test of the NIDS keyword search unit at
// its default size (64 signature words of 80 bits).
//
// Signatures of 3 to 10 ASCII characters are generated, zero padded to ten
// bytes and written in three bus beats each; a sample is read back. Then
// candidate words - signatures, near misses (one character changed) and
// random words - are sent in three beats; for each the testbench checks the
// single `hold`, the four-cycle latency from first beat to result, and
// alert/clean and the location against the reference list.
module nids_search_unit_tb;
  localparam int unsigned D = 64, AW = $clog2(D);

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, req = 1'b0, rdw = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [31:0] word_data = '0;
  logic word_valid = 1'b0, word_sop = 1'b0;
  logic hold, done, alert, clean;
  logic [AW-1:0] location;
  int checks = 0, failures = 0;
  int n_alert = 0, n_clean = 0;

  logic [79:0] sig [D];

  nids_search_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [79:0] rand_word();
    logic [79:0] w = '0;
    int len = $urandom_range(3, 10);
    for (int c = 0; c < len; c++) w[79 - 8*c -: 8] = 8'($urandom_range(97, 122));
    return w;
  endfunction

  function automatic logic [31:0] beat_of(input logic [79:0] w, input int b);
    logic [95:0] p = {w, 16'h0};
    return p[95 - 32*b -: 32];
  endfunction

  task automatic prog_write(input int a, input logic [79:0] w);
    for (int b = 0; b < 3; b++) begin
      @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b0; addr = AW'(a); wdata = beat_of(w, b);
    end
    @(negedge clk); req = 1'b0;
    sig[a] = w;
  endtask

  task automatic prog_read(input int a);
    @(negedge clk); en = 1'b0; req = 1'b1; rdw = 1'b1; addr = AW'(a);
    @(negedge clk); req = 1'b0;
    for (int b = 0; b < 3; b++) begin
      check(rvalid && rdata == beat_of(sig[a], b), $sformatf("read %0d beat %0d", a, b));
      @(negedge clk);
    end
  endtask

  task automatic search(input logic [79:0] w);
    bit exp = 0; int exp_loc = 0, holds = 0, cyc = 0;
    for (int i = D - 1; i >= 0; i--) if (sig[i] == w) begin exp = 1; exp_loc = i; end
    for (int b = 0; b < 3; b++) begin
      @(negedge clk); en = 1'b1; word_valid = 1'b1; word_sop = (b == 0); word_data = beat_of(w, b);
    end
    @(negedge clk); word_valid = 1'b0; word_sop = 1'b0;
    cyc = 3;
    while (!done && cyc < 10) begin
      #1 if (hold) holds++;
      @(negedge clk); cyc++;
    end
    check(cyc == 4, $sformatf("result after %0d cycles, expected 4", cyc));
    check(holds == 1, $sformatf("hold seen %0d times", holds));
    check(alert == exp && clean == !exp, $sformatf("result for %h", w));
    if (exp) check(location == AW'(exp_loc), "location of matching signature");
    if (alert) n_alert++;
    if (clean) n_clean++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < D; i++) prog_write(i, rand_word());
    for (int i = 0; i < D; i += 5) prog_read(i);
    for (int n = 0; n < 300; n++) begin
      automatic logic [79:0] w = sig[$urandom_range(D - 1)];
      case ($urandom_range(2))
        0: search(w);
        1: begin
          w[79 - 8 * $urandom_range(9) -: 8] ^= 8'h20;
          search(w);
        end
        default: search(rand_word());
      endcase
    end
    check(n_alert > 0 && n_clean > 0, "both alert and clean results seen");
    $display("words alert=%0d clean=%0d", n_alert, n_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
