// rcam_network_devices_tb: end-to-end test of the six RCAM network units in
// the top, every parameter at its default.
//
// Each unit is programmed over its own 32-bit bus, a stored word is read back,
// and its input stream is driven with traffic that both hits and misses, while
// the other units work at the same time. Counted mechanisms, each of which
// must occur at least once: programming writes and reads, HOLD pauses, hits
// and misses of every unit, the QoS fallback to the lowest-priority queue and
// the routing unit's "destination not found". Latencies are checked per unit:
// Ethernet 4, WLAN 3, firewall 11, QoS 12, NIDS 4 and routing 3 cycles.
module rcam_network_devices_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // ---- port signals, grouped per unit -----------------------------------
  logic        eth_en = 0, eth_req = 0, eth_rdw = 0; logic [4:0] eth_addr = 0;
  logic [31:0] eth_wdata = 0, eth_rdata; logic eth_rvalid;
  logic [31:0] eth_pkt_data = 0; logic eth_pkt_valid = 0, eth_pkt_sop = 0;
  logic        eth_hold, eth_done, eth_pass, eth_drop; logic [4:0] eth_location;
  logic [47:0] eth_src_mac, eth_dst_mac;

  logic        wlan_en = 0, wlan_req = 0, wlan_rdw = 0; logic [6:0] wlan_addr = 0;
  logic [31:0] wlan_wdata = 0, wlan_rdata; logic wlan_rvalid;
  logic [31:0] wlan_sa_data = 0; logic wlan_sa_valid = 0, wlan_sa_sop = 0;
  logic        wlan_hold, wlan_done, wlan_accept, wlan_reject; logic [6:0] wlan_location;

  logic        foc_en = 0, foc_req = 0, foc_rdw = 0; logic [5:0] foc_addr = 0;
  logic [31:0] foc_wdata = 0, foc_rdata; logic foc_rvalid;
  logic [31:0] foc_pkt_data = 0; logic foc_pkt_valid = 0, foc_pkt_sop = 0;
  logic        foc_hold, foc_done, foc_permit, foc_deny; logic [5:0] foc_location;

  logic        qos_en = 0, qos_req = 0, qos_rdw = 0; logic [3:0] qos_addr = 0;
  logic [31:0] qos_wdata = 0, qos_rdata; logic qos_rvalid;
  logic [31:0] qos_pkt_data = 0; logic qos_pkt_valid = 0, qos_pkt_sop = 0;
  logic        qos_hold, qos_done, qos_classified; logic [3:0] qos_queue_id; logic [15:0] qos_queue_en;

  logic        nids_en = 0, nids_req = 0, nids_rdw = 0; logic [5:0] nids_addr = 0;
  logic [31:0] nids_wdata = 0, nids_rdata; logic nids_rvalid;
  logic [31:0] nids_word_data = 0; logic nids_word_valid = 0, nids_word_sop = 0;
  logic        nids_hold, nids_done, nids_alert, nids_clean; logic [5:0] nids_location;

  logic        rt_en = 0, rt_req = 0; logic [7:0] rt_addr = 0; logic [31:0] rt_wdata = 0;
  logic [31:0] rt_dst_ip = 0; logic rt_dst_valid = 0;
  logic        rt_result_valid, rt_found, rt_not_found;
  logic [31:0] rt_next_hop; logic [7:0] rt_hop_count, rt_iface;

  rcam_network_devices dut (.*);

  always #5 clk = ~clk;

  // ---- mechanism counters ------------------------------------------------
  int n_write = 0, n_read = 0, n_hold = 0;
  int eth_hit = 0, eth_miss = 0, wlan_hit = 0, wlan_miss = 0, foc_hit = 0, foc_miss = 0;
  int qos_hit = 0, qos_default = 0, nids_hit = 0, nids_miss = 0, rt_hit = 0, rt_miss = 0;

  always @(posedge clk) if (rst_n)
    n_hold += int'(eth_hold) + int'(wlan_hold) + int'(foc_hold) + int'(qos_hold) + int'(nids_hold);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // big-endian beat b of a word padded to whole beats
  function automatic logic [31:0] beat(input logic [127:0] w, input int width, input int b);
    logic [127:0] p = w << (128 - width);
    return p[127 - 32*b -: 32];
  endfunction

  // frame with the given MAC addresses and IPv4/L4 fields
  function automatic logic [511:0] frame(input logic [47:0] da, sa, input logic [7:0] tos,
                                         input logic [31:0] sip, dip, input logic [15:0] sp, dp);
    logic [511:0] f = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                       $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    f[511 -: 96]        = {da, sa};
    f[511 - 8*12 -: 24] = {16'h0800, 8'h45};
    f[511 - 8*15 -: 8]  = tos;
    f[511 - 8*26 -: 96] = {sip, dip, sp, dp};
    return f;
  endfunction

  // ---- reference contents -------------------------------------------------
  logic [47:0]  eth_tab [32];
  logic [47:0]  wlan_tab [128];
  logic [95:0]  foc_tab [64];
  logic [103:0] qos_tab [16];
  logic [79:0]  nids_tab [64];
  logic [31:0]  rt_ip [256];
  logic [47:0]  rt_ent [256];

  // ---- Ethernet filter ------------------------------------------------------
  task automatic eth_test();
    eth_en = 0;
    for (int i = 0; i < 32; i++) begin
      eth_tab[i] = {16'h0200, 24'h0, 8'(i)};
      for (int b = 0; b < 2; b++) begin
        @(negedge clk); eth_req = 1; eth_rdw = 0; eth_addr = 5'(i); eth_wdata = beat(128'(eth_tab[i]), 48, b);
      end
      @(negedge clk); eth_req = 0; n_write++;
    end
    @(negedge clk); eth_req = 1; eth_rdw = 1; eth_addr = 5'd9;
    @(negedge clk); eth_req = 0;
    check(eth_rvalid && eth_rdata == beat(128'(eth_tab[9]), 48, 0), "eth read beat 0");
    @(negedge clk);
    check(eth_rvalid && eth_rdata == beat(128'(eth_tab[9]), 48, 1), "eth read beat 1"); n_read++;
    eth_en = 1;
    for (int n = 0; n < 20; n++) begin
      automatic int k = $urandom_range(63);
      automatic logic [47:0] sa = {16'h0200, 24'h0, 8'(k)};
      automatic logic [511:0] f = frame(48'hffff_ffff_ffff, sa, 0, 0, 0, 0, 0);
      automatic int b = 0, cyc = 0;
      automatic bit decided = 0;
      while (!decided || b < 16) begin
        @(negedge clk); #1;
        if (eth_done) begin
          decided = 1;
          check(cyc == 4, "eth latency 4");
          check(eth_pass == (k < 32) && eth_drop == (k >= 32), "eth decision");
          if (eth_pass) begin eth_hit++; check(eth_location == 5'(k), "eth location"); end
          else eth_miss++;
        end
        if (!eth_hold && b < 16) begin
          eth_pkt_valid = 1; eth_pkt_sop = (b == 0); eth_pkt_data = f[511 - 32*b -: 32]; b++;
        end else begin
          eth_pkt_valid = 0; eth_pkt_sop = 0;
        end
        if (b > 0) cyc++;
      end
      @(negedge clk); eth_pkt_valid = 0; eth_pkt_sop = 0;
    end
  endtask

  // ---- WLAN filter ------------------------------------------------------------
  task automatic wlan_test();
    wlan_en = 0;
    for (int i = 0; i < 128; i++) begin
      wlan_tab[i] = {24'h00_1b_63, 16'h0, 8'(i)};
      for (int b = 0; b < 2; b++) begin
        @(negedge clk); wlan_req = 1; wlan_rdw = 0; wlan_addr = 7'(i); wlan_wdata = beat(128'(wlan_tab[i]), 48, b);
      end
      @(negedge clk); wlan_req = 0; n_write++;
    end
    @(negedge clk); wlan_req = 1; wlan_rdw = 1; wlan_addr = 7'd100;
    @(negedge clk); wlan_req = 0;
    check(wlan_rvalid && wlan_rdata == beat(128'(wlan_tab[100]), 48, 0), "wlan read beat 0");
    @(negedge clk);
    check(wlan_rvalid && wlan_rdata == beat(128'(wlan_tab[100]), 48, 1), "wlan read beat 1"); n_read++;
    wlan_en = 1;
    for (int n = 0; n < 20; n++) begin
      automatic int k = $urandom_range(255);
      automatic logic [47:0] sa = {24'h00_1b_63, 16'h0, 8'(k)};
      automatic int cyc = 2;
      if (k >= 128) sa[40] = 1'b1;
      @(negedge clk); wlan_sa_valid = 1; wlan_sa_sop = 1; wlan_sa_data = sa[47:16];
      @(negedge clk); wlan_sa_sop = 0; wlan_sa_data = {sa[15:0], 16'h0};
      @(negedge clk); wlan_sa_valid = 0;
      while (!wlan_done && cyc < 8) begin @(negedge clk); cyc++; end
      check(cyc == 3, "wlan latency 3");
      check(wlan_accept == (k < 128) && wlan_reject == (k >= 128), "wlan decision");
      if (wlan_accept) begin wlan_hit++; check(wlan_location == 7'(k), "wlan location"); end
      else wlan_miss++;
    end
  endtask

  // ---- firewall and QoS (both on frame streams) ----------------------------
  task automatic foc_test();
    foc_en = 0;
    for (int i = 0; i < 64; i++) begin
      foc_tab[i] = {32'h0a00_0000 + i, 32'hc0a8_0001, 16'(1024 + i), 16'd80};
      for (int b = 0; b < 3; b++) begin
        @(negedge clk); foc_req = 1; foc_rdw = 0; foc_addr = 6'(i); foc_wdata = beat(128'(foc_tab[i]), 96, b);
      end
      @(negedge clk); foc_req = 0; n_write++;
    end
    @(negedge clk); foc_req = 1; foc_rdw = 1; foc_addr = 6'd33;
    @(negedge clk); foc_req = 0;
    for (int b = 0; b < 3; b++) begin
      check(foc_rvalid && foc_rdata == beat(128'(foc_tab[33]), 96, b), "foc read"); @(negedge clk);
    end
    n_read++;
    foc_en = 1;
    for (int n = 0; n < 20; n++) begin
      automatic int k = $urandom_range(127);
      automatic logic [511:0] f = frame(0, 0, 0, 32'h0a00_0000 + k, 32'hc0a8_0001, 16'(1024 + k), 16'd80);
      automatic int b = 0, cyc = 0;
      automatic bit decided = 0;
      while (!decided || b < 16) begin
        @(negedge clk); #1;
        if (foc_done) begin
          decided = 1;
          check(cyc == 11, "foc latency 11");
          check(foc_permit == (k < 64) && foc_deny == (k >= 64), "foc decision");
          if (foc_permit) begin foc_hit++; check(foc_location == 6'(k), "foc rule"); end
          else foc_miss++;
        end
        if (!foc_hold && b < 16) begin
          foc_pkt_valid = 1; foc_pkt_sop = (b == 0); foc_pkt_data = f[511 - 32*b -: 32]; b++;
        end else begin
          foc_pkt_valid = 0; foc_pkt_sop = 0;
        end
        if (b > 0) cyc++;
      end
      @(negedge clk); foc_pkt_valid = 0; foc_pkt_sop = 0;
    end
  endtask

  task automatic qos_test();
    qos_en = 0;
    for (int i = 0; i < 16; i++) begin
      qos_tab[i] = {32'h0a01_0000 + i, 16'd5000, 32'h0a02_0001, 16'(6000 + i), 8'hb8};
      for (int b = 0; b < 4; b++) begin
        @(negedge clk); qos_req = 1; qos_rdw = 0; qos_addr = 4'(i); qos_wdata = beat(128'(qos_tab[i]), 104, b);
      end
      @(negedge clk); qos_req = 0; n_write++;
    end
    @(negedge clk); qos_req = 1; qos_rdw = 1; qos_addr = 4'd6;
    @(negedge clk); qos_req = 0;
    for (int b = 0; b < 4; b++) begin
      check(qos_rvalid && qos_rdata == beat(128'(qos_tab[6]), 104, b), "qos read"); @(negedge clk);
    end
    n_read++;
    qos_en = 1;
    for (int n = 0; n < 20; n++) begin
      automatic int k = $urandom_range(31);
      automatic logic [511:0] f = frame(0, 0, 8'hb8, 32'h0a01_0000 + k, 32'h0a02_0001, 16'd5000, 16'(6000 + k));
      automatic int b = 0, cyc = 0, q = (k < 16) ? k : 15;
      automatic bit decided = 0;
      while (!decided || b < 16) begin
        @(negedge clk); #1;
        if (qos_done) begin
          decided = 1;
          check(cyc == 12, "qos latency 12");
          check(qos_classified == (k < 16) && qos_queue_en == 16'(1) << q, "qos queue");
          if (qos_classified) qos_hit++; else qos_default++;
        end
        if (!qos_hold && b < 16) begin
          qos_pkt_valid = 1; qos_pkt_sop = (b == 0); qos_pkt_data = f[511 - 32*b -: 32]; b++;
        end else begin
          qos_pkt_valid = 0; qos_pkt_sop = 0;
        end
        if (b > 0) cyc++;
      end
      @(negedge clk); qos_pkt_valid = 0; qos_pkt_sop = 0;
    end
  endtask

  // ---- NIDS search ------------------------------------------------------------
  task automatic nids_test();
    nids_en = 0;
    for (int i = 0; i < 64; i++) begin
      nids_tab[i] = {"cmd.exe", 8'h30 + 8'(i / 10), 8'h30 + 8'(i % 10), 8'h00};
      for (int b = 0; b < 3; b++) begin
        @(negedge clk); nids_req = 1; nids_rdw = 0; nids_addr = 6'(i); nids_wdata = beat(128'(nids_tab[i]), 80, b);
      end
      @(negedge clk); nids_req = 0; n_write++;
    end
    @(negedge clk); nids_req = 1; nids_rdw = 1; nids_addr = 6'd12;
    @(negedge clk); nids_req = 0;
    for (int b = 0; b < 3; b++) begin
      check(nids_rvalid && nids_rdata == beat(128'(nids_tab[12]), 80, b), "nids read"); @(negedge clk);
    end
    n_read++;
    nids_en = 1;
    for (int n = 0; n < 20; n++) begin
      automatic int k = $urandom_range(99);
      automatic logic [79:0] w = {"cmd.exe", 8'h30 + 8'(k / 10), 8'h30 + 8'(k % 10), 8'h00};
      automatic int cyc = 3;
      for (int b = 0; b < 3; b++) begin
        @(negedge clk); nids_word_valid = 1; nids_word_sop = (b == 0); nids_word_data = beat(128'(w), 80, b);
      end
      @(negedge clk); nids_word_valid = 0; nids_word_sop = 0;
      while (!nids_done && cyc < 10) begin @(negedge clk); cyc++; end
      check(cyc == 4, "nids latency 4");
      check(nids_alert == (k < 64) && nids_clean == (k >= 64), "nids result");
      if (nids_alert) begin nids_hit++; check(nids_location == 6'(k), "nids signature"); end
      else nids_miss++;
    end
  endtask

  // ---- routing table ------------------------------------------------------------
  task automatic rt_test();
    rt_en = 0;
    for (int i = 0; i < 256; i++) begin
      rt_ip[i]  = {8'd172, 8'd16, 8'(i), 8'd0};
      rt_ent[i] = {32'hc0a8_0000 + i, 8'(i % 16), 8'(i % 4)};
      @(negedge clk); rt_req = 1; rt_addr = 8'(i); rt_wdata = rt_ip[i];
      @(negedge clk); rt_wdata = rt_ent[i][47:16];
      @(negedge clk); rt_wdata = {rt_ent[i][15:0], 16'h0};
      @(negedge clk); rt_req = 0; n_write++;
    end
    rt_en = 1;
    for (int n = 0; n < 20; n++) begin
      automatic int k = $urandom_range(300);
      automatic logic [31:0] ip = (k < 256) ? rt_ip[k] : 32'h0808_0808;
      automatic int cyc = 0;
      @(negedge clk); rt_dst_ip = ip; rt_dst_valid = 1;
      @(negedge clk); rt_dst_valid = 0; cyc = 1;
      while (!rt_result_valid && cyc < 8) begin @(negedge clk); cyc++; end
      check(cyc == 3, "routing latency 3");
      check(rt_found == (k < 256) && rt_not_found == (k >= 256), "routing found / not found");
      if (rt_found) begin
        rt_hit++;
        check({rt_next_hop, rt_hop_count, rt_iface} == rt_ent[k], "routing entry");
      end else rt_miss++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      eth_test();
      wlan_test();
      foc_test();
      qos_test();
      nids_test();
      rt_test();
    join
    check(n_write == 32 + 128 + 64 + 16 + 64 + 256, "all programming writes done");
    check(n_read == 5, "programming reads done");
    check(n_hold == 100, $sformatf("hold pauses counted %0d, expected 100", n_hold));
    check(eth_hit > 0 && eth_miss > 0, "eth pass and drop");
    check(wlan_hit > 0 && wlan_miss > 0, "wlan accept and reject");
    check(foc_hit > 0 && foc_miss > 0, "foc permit and deny");
    check(qos_hit > 0, "qos classified");
    check(qos_default > 0, "qos lowest-priority queue fallback");
    check(nids_hit > 0 && nids_miss > 0, "nids alert and clean");
    check(rt_hit > 0, "routing found");
    check(rt_miss > 0, "routing destination not found");
    $display("writes=%0d reads=%0d holds=%0d", n_write, n_read, n_hold);
    $display("eth %0d/%0d wlan %0d/%0d foc %0d/%0d qos %0d/%0d nids %0d/%0d route %0d/%0d (hit/miss)",
             eth_hit, eth_miss, wlan_hit, wlan_miss, foc_hit, foc_miss, qos_hit, qos_default,
             nids_hit, nids_miss, rt_hit, rt_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
