// stare_lane: one of the four independent lanes of the STARE readout firmware.
// Data from one Aurora link (or, in test mode, from the counter data generator) fill the
// double toggle event buffer; the package slicer cuts each buffer into packets of at most
// 8 kB with a sequence number; the data stopper lets a packet through only while the RUDP
// core has room for it; the packet is copied into the frame store as it passes and merged,
// by the package generator, with frames read back for re-transmission; the UDP interface
// adds the Ethernet/IPv4/UDP headers and the protocol data and hands the frame to the
// network stack (mac_*). Frames coming back from the server (rx_*) carry acknowledgements
// for the RUDP core. cfg_rudp_enable switches the reliable delivery on; without it frames
// are sent once. The chain and its order follow the document's STARE firmware and
// selective repeat block diagrams; the network stack itself is outside this block.
// Timing: one 64-bit word per clock while the network stack is ready. A packet is admitted
// (marked active in the RUDP core) in the clock its first word passes the data stopper,
// before its header leaves the UDP interface; the header's tx_start then starts its
// time-out. Choosing the source per packet, the window of WINDOW frames held on chip and
// the acknowledgement frame format are this design's own choices.
module stare_lane #(
  parameter int unsigned BUF_BYTES = 16384,
  parameter int unsigned PKT_BYTES = 8192,
  parameter int unsigned WINDOW    = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  // configuration
  input  logic [15:0]  cfg_buf_bytes,
  input  logic         cfg_gen_enable,
  input  logic [15:0]  cfg_gen_words,
  input  logic         cfg_rudp_enable,
  input  logic [31:0]  cfg_rudp_timeout,
  input  logic [47:0]  cfg_src_mac,
  input  logic [47:0]  cfg_dst_mac,
  input  logic [31:0]  cfg_src_ip,
  input  logic [31:0]  cfg_dst_ip,
  input  logic [15:0]  cfg_src_port,
  input  logic [15:0]  cfg_dst_port,
  // Aurora link from the pre-processing board
  input  logic         au_valid,
  output logic         au_ready,
  input  logic [63:0]  au_data,
  input  logic         au_last,
  // network stack, transmit and receive
  output logic         mac_valid,
  input  logic         mac_ready,
  output logic [63:0]  mac_data,
  output logic         mac_last,
  input  logic         rx_valid,
  input  logic [63:0]  rx_data,
  input  logic         rx_last,
  // status
  output logic [31:0]  n_toggles,
  output logic [31:0]  n_gen_packets,
  output logic [31:0]  n_acked,
  output logic [31:0]  n_retx,
  output logic [31:0]  n_frames
);
  // source selection: Aurora or test generator (switched at packet boundaries)
  logic        g_valid, g_ready, g_last;
  logic [63:0] g_data;
  logic        use_gen, src_busy;
  data_generator u_gen (
    .clk, .rst_n, .enable(cfg_gen_enable), .cfg_words(cfg_gen_words), .out_valid(g_valid),
    .out_ready(g_ready), .out_data(g_data), .out_last(g_last), .n_packets(n_gen_packets));

  logic        b_in_valid, b_in_ready, b_in_last;
  logic [63:0] b_in_data;
  logic        cur_gen;
  assign cur_gen    = src_busy ? use_gen : cfg_gen_enable;
  assign b_in_valid = cur_gen ? g_valid : au_valid;
  assign b_in_data  = cur_gen ? g_data  : au_data;
  assign b_in_last  = cur_gen ? g_last  : au_last;
  assign g_ready    = cur_gen && b_in_ready;
  assign au_ready   = !cur_gen && b_in_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin use_gen <= 1'b0; src_busy <= 1'b0; end
    else if (b_in_valid && b_in_ready) begin
      src_busy <= !b_in_last;
      use_gen  <= cur_gen;
    end
  end

  // double toggle FIFO
  logic        e_valid, e_ready, e_last;
  logic [63:0] e_data;
  logic [15:0] e_len;
  event_buffer #(.MAX_BYTES(BUF_BYTES)) u_buf (
    .clk, .rst_n, .cfg_bytes(cfg_buf_bytes), .in_valid(b_in_valid), .in_ready(b_in_ready),
    .in_data(b_in_data), .in_last(b_in_last), .out_valid(e_valid), .out_ready(e_ready),
    .out_data(e_data), .out_last(e_last), .out_len(e_len), .n_toggles);

  // package slicer
  logic        s_valid, s_ready, s_last;
  logic [63:0] s_data;
  logic [15:0] s_len;
  logic [31:0] s_seq;
  package_slicer #(.PKT_BYTES(PKT_BYTES)) u_slice (
    .clk, .rst_n, .in_valid(e_valid), .in_ready(e_ready), .in_data(e_data), .in_last(e_last),
    .in_len(e_len), .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data),
    .out_last(s_last), .out_len(s_len), .out_seq(s_seq));

  // data stopper: a packet is admitted, and its slot in the RUDP window taken, as soon as its
  // first word is offered and the core has room; it then passes until its last word
  logic        admit_ok, in_pkt, admitted, admit_now, pass;
  logic        n_valid, n_ready;
  assign admit_now = s_valid && !in_pkt && !admitted && admit_ok;
  assign pass      = in_pkt || admitted || admit_ok;
  assign n_valid   = s_valid && pass;
  assign s_ready   = n_ready && pass;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt <= 1'b0; admitted <= 1'b0;
    end else begin
      if (admit_now) admitted <= 1'b1;
      if (s_valid && s_ready) begin
        in_pkt <= !s_last;
        if (s_last) admitted <= 1'b0;
      end
    end
  end

  // RUDP core, frame store, package generator
  logic        rtx_req, rtx_req_ready, tx_start;
  logic [31:0] rtx_seq, tx_seq, ack_seq, n_to;
  logic        ack_valid;
  logic [WINDOW-1:0] active;
  rudp_core #(.WINDOW(WINDOW)) u_rudp (
    .clk, .rst_n, .cfg_enable(cfg_rudp_enable), .cfg_timeout(cfg_rudp_timeout),
    .admit_seq(s_seq), .admit_ok, .admit(admit_now),
    .tx_start, .tx_seq, .ack_valid, .ack_seq, .rtx_valid(rtx_req), .rtx_ready(rtx_req_ready),
    .rtx_seq, .active, .n_acked, .n_timeouts(n_to));

  logic        r_valid, r_ready, r_last;
  logic [63:0] r_data;
  logic [15:0] r_len;
  logic [31:0] r_seq;
  frame_store #(.WINDOW(WINDOW), .PKT_WORDS(PKT_BYTES / 8)) u_store (
    .clk, .rst_n, .wr_valid(s_valid && s_ready), .wr_data(s_data), .wr_last(s_last),
    .wr_len(s_len), .wr_seq(s_seq), .rd_req(rtx_req), .rd_req_ready(rtx_req_ready),
    .rd_seq(rtx_seq), .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data),
    .out_last(r_last), .out_len(r_len), .out_seq(r_seq));

  logic        m_valid, m_ready, m_last, m_retx;
  logic [63:0] m_data;
  logic [15:0] m_len;
  logic [31:0] m_seq;
  package_generator u_pgen (
    .clk, .rst_n, .new_valid(n_valid), .new_ready(n_ready), .new_data(s_data),
    .new_last(s_last), .new_len(s_len), .new_seq(s_seq), .rtx_valid(r_valid),
    .rtx_ready(r_ready), .rtx_data(r_data), .rtx_last(r_last), .rtx_len(r_len),
    .rtx_seq(r_seq), .out_valid(m_valid), .out_ready(m_ready), .out_data(m_data),
    .out_last(m_last), .out_len(m_len), .out_seq(m_seq), .out_retx(m_retx));

  udp_tx u_udp (
    .clk, .rst_n, .cfg_src_mac, .cfg_dst_mac, .cfg_src_ip, .cfg_dst_ip, .cfg_src_port,
    .cfg_dst_port, .in_valid(m_valid), .in_ready(m_ready), .in_data(m_data),
    .in_last(m_last), .in_len(m_len), .in_seq(m_seq), .in_retx(m_retx),
    .out_valid(mac_valid), .out_ready(mac_ready), .out_data(mac_data), .out_last(mac_last),
    .tx_start, .tx_seq);

  logic [31:0] n_ign;
  ack_parser u_ack (
    .clk, .rst_n, .in_valid(rx_valid), .in_data(rx_data), .in_last(rx_last),
    .ack_valid, .ack_seq, .n_ignored(n_ign));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin n_retx <= '0; n_frames <= '0; end
    else if (mac_valid && mac_ready && mac_last) begin
      n_frames <= n_frames + 1'b1;
      if (m_retx) n_retx <= n_retx + 1'b1;
    end
  end
endmodule
