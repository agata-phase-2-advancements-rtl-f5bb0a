// stare_firmware: the STARE readout firmware, NLANES (four) independent lanes, each taking
// one 10 Gbps Aurora link from the pre-processing board and sending UDP frames to its own
// server over its own 10 Gbps port. All lanes share one configuration except the network
// addresses, which are set per lane so each lane can feed a different server. Slow control
// (IPbus in the document) is represented by the configuration ports.
// Timing: the four lanes run in parallel on one clock, each moving one 64-bit word per clock.
module stare_firmware #(
  parameter int unsigned NLANES    = 4,
  parameter int unsigned BUF_BYTES = 16384,
  parameter int unsigned PKT_BYTES = 8192,
  parameter int unsigned WINDOW    = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [15:0]                cfg_buf_bytes,
  input  logic [NLANES-1:0]          cfg_gen_enable,
  input  logic [15:0]                cfg_gen_words,
  input  logic                       cfg_rudp_enable,
  input  logic [31:0]                cfg_rudp_timeout,
  input  logic [47:0]                cfg_src_mac,
  input  logic [NLANES-1:0][47:0]    cfg_dst_mac,
  input  logic [31:0]                cfg_src_ip,
  input  logic [NLANES-1:0][31:0]    cfg_dst_ip,
  input  logic [15:0]                cfg_src_port,
  input  logic [15:0]                cfg_dst_port,
  input  logic [NLANES-1:0]          au_valid,
  output logic [NLANES-1:0]          au_ready,
  input  logic [NLANES-1:0][63:0]    au_data,
  input  logic [NLANES-1:0]          au_last,
  output logic [NLANES-1:0]          mac_valid,
  input  logic [NLANES-1:0]          mac_ready,
  output logic [NLANES-1:0][63:0]    mac_data,
  output logic [NLANES-1:0]          mac_last,
  input  logic [NLANES-1:0]          rx_valid,
  input  logic [NLANES-1:0][63:0]    rx_data,
  input  logic [NLANES-1:0]          rx_last,
  output logic [NLANES-1:0][31:0]    n_toggles,
  output logic [NLANES-1:0][31:0]    n_gen_packets,
  output logic [NLANES-1:0][31:0]    n_acked,
  output logic [NLANES-1:0][31:0]    n_retx,
  output logic [NLANES-1:0][31:0]    n_frames
);
  for (genvar l = 0; l < int'(NLANES); l++) begin : g_lane
    stare_lane #(.BUF_BYTES(BUF_BYTES), .PKT_BYTES(PKT_BYTES), .WINDOW(WINDOW)) u_lane (
      .clk, .rst_n, .cfg_buf_bytes, .cfg_gen_enable(cfg_gen_enable[l]), .cfg_gen_words,
      .cfg_rudp_enable, .cfg_rudp_timeout, .cfg_src_mac, .cfg_dst_mac(cfg_dst_mac[l]),
      .cfg_src_ip, .cfg_dst_ip(cfg_dst_ip[l]), .cfg_src_port(16'(cfg_src_port + 16'(l))),
      .cfg_dst_port, .au_valid(au_valid[l]), .au_ready(au_ready[l]), .au_data(au_data[l]),
      .au_last(au_last[l]), .mac_valid(mac_valid[l]), .mac_ready(mac_ready[l]),
      .mac_data(mac_data[l]), .mac_last(mac_last[l]), .rx_valid(rx_valid[l]),
      .rx_data(rx_data[l]), .rx_last(rx_last[l]), .n_toggles(n_toggles[l]),
      .n_gen_packets(n_gen_packets[l]), .n_acked(n_acked[l]), .n_retx(n_retx[l]),
      .n_frames(n_frames[l]));
  end
endmodule
