// rcam_network_devices: six network units, each built around its own
// reconfigurable CAM (RCAM), side by side on one chip.
//
//   eth_  Ethernet source-address filter   48-bit words x 32    (pass / drop)
//   wlan_ WLAN access-point MAC filter     48-bit words x 128   (accept / reject)
//   foc_  firewall on chip                 96-bit rules x 64    (permit / deny)
//   qos_  QoS packet classifier            104-bit flows x 16   (queue select)
//   rt_   routing table search             32-bit IPs x 256 + 48-bit RAM
//   nids_ NIDS keyword search              80-bit words x 64    (alert / clean)
//
// The units share nothing but clock and reset; each keeps its own 32-bit
// programming bus (`*_en` low selects programming mode, `*_req` marks a beat)
// and its own input stream, and the ports of each are those of the unit
// module with its prefix. All RCAMs compare in one clock and use 8-bit
// sub-arrays. Timing per unit: see the unit modules. The sizes are those of
// the document's network devices; putting all six into one top is this
// design's way of presenting them together.
module rcam_network_devices #(
  parameter int unsigned ETH_DEPTH = 32,
  parameter int unsigned WLAN_DEPTH = 128,
  parameter int unsigned FOC_DEPTH = 64,
  parameter int unsigned QOS_NQ = 16,
  parameter int unsigned NIDS_DEPTH = 64,
  parameter int unsigned RT_DEPTH = 256,
  parameter int unsigned SUB_W = rcam_pkg::SUB_W,
  localparam int unsigned ETH_AW = (ETH_DEPTH > 1) ? $clog2(ETH_DEPTH) : 1,
  localparam int unsigned WLAN_AW = (WLAN_DEPTH > 1) ? $clog2(WLAN_DEPTH) : 1,
  localparam int unsigned FOC_AW = (FOC_DEPTH > 1) ? $clog2(FOC_DEPTH) : 1,
  localparam int unsigned QOS_AW = (QOS_NQ > 1) ? $clog2(QOS_NQ) : 1,
  localparam int unsigned NIDS_AW = (NIDS_DEPTH > 1) ? $clog2(NIDS_DEPTH) : 1,
  localparam int unsigned RT_AW = (RT_DEPTH > 1) ? $clog2(RT_DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // ethernet_addr_filter
  input  logic             eth_en,
  input  logic             eth_req,
  input  logic             eth_rdw,
  input  logic [ETH_AW-1:0] eth_addr,
  input  logic [31:0]      eth_wdata,
  output logic [31:0]      eth_rdata,
  output logic             eth_rvalid,
  input  logic [31:0]      eth_pkt_data,
  input  logic             eth_pkt_valid,
  input  logic             eth_pkt_sop,
  output logic             eth_hold,
  output logic             eth_done,
  output logic             eth_pass,
  output logic             eth_drop,
  output logic [ETH_AW-1:0] eth_location,
  output logic [48-1:0] eth_src_mac,
  output logic [48-1:0] eth_dst_mac,
  // wlan_mac_filter
  input  logic             wlan_en,
  input  logic             wlan_req,
  input  logic             wlan_rdw,
  input  logic [WLAN_AW-1:0] wlan_addr,
  input  logic [31:0]      wlan_wdata,
  output logic [31:0]      wlan_rdata,
  output logic             wlan_rvalid,
  input  logic [31:0]      wlan_sa_data,
  input  logic             wlan_sa_valid,
  input  logic             wlan_sa_sop,
  output logic             wlan_hold,
  output logic             wlan_done,
  output logic             wlan_accept,
  output logic             wlan_reject,
  output logic [WLAN_AW-1:0] wlan_location,
  // foc_unit
  input  logic             foc_en,
  input  logic             foc_req,
  input  logic             foc_rdw,
  input  logic [FOC_AW-1:0] foc_addr,
  input  logic [31:0]      foc_wdata,
  output logic [31:0]      foc_rdata,
  output logic             foc_rvalid,
  input  logic [31:0]      foc_pkt_data,
  input  logic             foc_pkt_valid,
  input  logic             foc_pkt_sop,
  output logic             foc_hold,
  output logic             foc_done,
  output logic             foc_permit,
  output logic             foc_deny,
  output logic [FOC_AW-1:0] foc_location,
  // qos_classifier
  input  logic             qos_en,
  input  logic             qos_req,
  input  logic             qos_rdw,
  input  logic [QOS_AW-1:0] qos_addr,
  input  logic [31:0]      qos_wdata,
  output logic [31:0]      qos_rdata,
  output logic             qos_rvalid,
  input  logic [31:0]      qos_pkt_data,
  input  logic             qos_pkt_valid,
  input  logic             qos_pkt_sop,
  output logic             qos_hold,
  output logic             qos_done,
  output logic             qos_classified,
  output logic [QOS_AW-1:0] qos_queue_id,
  output logic [QOS_NQ-1:0] qos_queue_en,
  // nids_search_unit
  input  logic             nids_en,
  input  logic             nids_req,
  input  logic             nids_rdw,
  input  logic [NIDS_AW-1:0] nids_addr,
  input  logic [31:0]      nids_wdata,
  output logic [31:0]      nids_rdata,
  output logic             nids_rvalid,
  input  logic [31:0]      nids_word_data,
  input  logic             nids_word_valid,
  input  logic             nids_word_sop,
  output logic             nids_hold,
  output logic             nids_done,
  output logic             nids_alert,
  output logic             nids_clean,
  output logic [NIDS_AW-1:0] nids_location,
  // route_search_unit
  input  logic             rt_en,
  input  logic             rt_req,
  input  logic [RT_AW-1:0] rt_addr,
  input  logic [31:0]      rt_wdata,
  input  logic [31:0]      rt_dst_ip,
  input  logic             rt_dst_valid,
  output logic             rt_result_valid,
  output logic             rt_found,
  output logic             rt_not_found,
  output logic [31:0]      rt_next_hop,
  output logic [7:0]       rt_hop_count,
  output logic [7:0]       rt_iface
);
  ethernet_addr_filter #(.DEPTH(ETH_DEPTH), .SUB_W(SUB_W)) u_eth (
    .clk (clk),
    .rst_n (rst_n),
    .en (eth_en),
    .req (eth_req),
    .rdw (eth_rdw),
    .addr (eth_addr),
    .wdata (eth_wdata),
    .rdata (eth_rdata),
    .rvalid (eth_rvalid),
    .pkt_data (eth_pkt_data),
    .pkt_valid (eth_pkt_valid),
    .pkt_sop (eth_pkt_sop),
    .hold (eth_hold),
    .done (eth_done),
    .pass (eth_pass),
    .drop (eth_drop),
    .location (eth_location),
    .src_mac (eth_src_mac),
    .dst_mac (eth_dst_mac)
  );

  wlan_mac_filter #(.DEPTH(WLAN_DEPTH), .SUB_W(SUB_W)) u_wlan (
    .clk (clk),
    .rst_n (rst_n),
    .en (wlan_en),
    .req (wlan_req),
    .rdw (wlan_rdw),
    .addr (wlan_addr),
    .wdata (wlan_wdata),
    .rdata (wlan_rdata),
    .rvalid (wlan_rvalid),
    .sa_data (wlan_sa_data),
    .sa_valid (wlan_sa_valid),
    .sa_sop (wlan_sa_sop),
    .hold (wlan_hold),
    .done (wlan_done),
    .accept (wlan_accept),
    .reject (wlan_reject),
    .location (wlan_location)
  );

  foc_unit #(.DEPTH(FOC_DEPTH), .SUB_W(SUB_W)) u_foc (
    .clk (clk),
    .rst_n (rst_n),
    .en (foc_en),
    .req (foc_req),
    .rdw (foc_rdw),
    .addr (foc_addr),
    .wdata (foc_wdata),
    .rdata (foc_rdata),
    .rvalid (foc_rvalid),
    .pkt_data (foc_pkt_data),
    .pkt_valid (foc_pkt_valid),
    .pkt_sop (foc_pkt_sop),
    .hold (foc_hold),
    .done (foc_done),
    .permit (foc_permit),
    .deny (foc_deny),
    .location (foc_location)
  );

  qos_classifier #(.NQ(QOS_NQ), .SUB_W(SUB_W)) u_qos (
    .clk (clk),
    .rst_n (rst_n),
    .en (qos_en),
    .req (qos_req),
    .rdw (qos_rdw),
    .addr (qos_addr),
    .wdata (qos_wdata),
    .rdata (qos_rdata),
    .rvalid (qos_rvalid),
    .pkt_data (qos_pkt_data),
    .pkt_valid (qos_pkt_valid),
    .pkt_sop (qos_pkt_sop),
    .hold (qos_hold),
    .done (qos_done),
    .classified (qos_classified),
    .queue_id (qos_queue_id),
    .queue_en (qos_queue_en)
  );

  nids_search_unit #(.DEPTH(NIDS_DEPTH), .SUB_W(SUB_W)) u_nids (
    .clk (clk),
    .rst_n (rst_n),
    .en (nids_en),
    .req (nids_req),
    .rdw (nids_rdw),
    .addr (nids_addr),
    .wdata (nids_wdata),
    .rdata (nids_rdata),
    .rvalid (nids_rvalid),
    .word_data (nids_word_data),
    .word_valid (nids_word_valid),
    .word_sop (nids_word_sop),
    .hold (nids_hold),
    .done (nids_done),
    .alert (nids_alert),
    .clean (nids_clean),
    .location (nids_location)
  );

  route_search_unit #(.DEPTH(RT_DEPTH), .SUB_W(SUB_W)) u_rt (
    .clk (clk), .rst_n (rst_n), .en (rt_en), .req (rt_req), .addr (rt_addr), .wdata (rt_wdata),
    .dst_ip (rt_dst_ip), .dst_valid (rt_dst_valid), .result_valid (rt_result_valid),
    .found (rt_found), .not_found (rt_not_found), .next_hop (rt_next_hop),
    .hop_count (rt_hop_count), .iface (rt_iface)
  );
endmodule
