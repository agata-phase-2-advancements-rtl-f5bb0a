// agata_ph2_top: the digital part of the AGATA phase-2 front-end chain for one crystal.
// Three firmware designs stand side by side, as they sit in three different devices:
//  - pace_firmware: the pre-processing FPGA of the PACE-CAP board (link de-aggregation,
//    38 channel datapaths, GTS leaf, event / long-trace / spectra / monitor memories and
//    four readout engines);
//  - stare_firmware: the STARE Ethernet readout board (four lanes of event buffer, packet
//    slicing, reliable UDP and the UDP interface);
//  - gts_trigger_processor: the 256-leaf GTS trigger processor.
// What joins them in the real system is not logic of this design and is left as ports:
// the four Aurora links from PACE (pace_ro_*) to STARE (stare_au_*), and the GTS tree that
// carries PACE's trigger requests (pace_gts_req*) up to the trigger processor (tp_req*) and
// its replies (tp_rep*) back down (pace_gts_rep*). A system simulation closes those paths.
// Timing: the whole design runs on the one 100 MHz clock clk with the active-low synchronous
// reset rst_n; latencies are those of the three sub-designs.
module agata_ph2_top
  import agata_pkg::*;
#(
  parameter int unsigned LINES = 10,
  parameter int unsigned CH    = 38,
  parameter int unsigned NLANE = 4,
  parameter int unsigned NLEAF = 256,
  parameter int unsigned NPART = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ---- PACE pre-processing ----
  input  logic [LINES-1:0]              agg_valid,
  input  logic [LINES-1:0][15:0]        agg_data,
  input  logic [LINES-1:0]              agg_mark,
  input  pace_cfg_t                     pace_cfg,
  input  logic [CH-1:0][15:0]           pace_baseline,
  input  logic [LEAF_W-1:0]             pace_leaf_id,
  input  logic                          pace_ts_load,
  input  ts_t                           pace_ts_load_val,
  input  logic                          pace_lt_req,
  input  logic [7:0]                    pace_lt_ch,
  input  logic [15:0]                   pace_lt_len,
  input  logic                          pace_sp_clear,
  input  logic                          pace_sp_req,
  input  logic [7:0]                    pace_sp_ch,
  input  logic                          pace_mon_arm,
  input  logic                          pace_sys_off,
  input  logic                          pace_err,
  input  logic                          pace_backpressure,
  output logic                          pace_gts_req_valid,
  input  logic                          pace_gts_req_ready,
  output gts_req_t                      pace_gts_req,
  input  logic                          pace_gts_rep_valid,
  input  gts_reply_t                    pace_gts_rep,
  output logic [NLANE-1:0]              pace_ro_valid,
  input  logic [NLANE-1:0]              pace_ro_ready,
  output logic [NLANE-1:0][63:0]        pace_ro_data,
  output logic [NLANE-1:0]              pace_ro_last,
  output logic [LINES-1:0]              pace_link_locked,
  output ts_t                           pace_ts,
  output logic [6:0][31:0]              pace_counts,   // triggers, inhibited, events,
                                                       // read out, rejected, timeouts, idle
  // ---- STARE readout ----
  input  logic [15:0]                   stare_buf_bytes,
  input  logic [NLANE-1:0]              stare_gen_enable,
  input  logic [15:0]                   stare_gen_words,
  input  logic                          stare_rudp_enable,
  input  logic [31:0]                   stare_rudp_timeout,
  input  logic [47:0]                   stare_src_mac,
  input  logic [NLANE-1:0][47:0]        stare_dst_mac,
  input  logic [31:0]                   stare_src_ip,
  input  logic [NLANE-1:0][31:0]        stare_dst_ip,
  input  logic [15:0]                   stare_src_port,
  input  logic [15:0]                   stare_dst_port,
  input  logic [NLANE-1:0]              stare_au_valid,
  output logic [NLANE-1:0]              stare_au_ready,
  input  logic [NLANE-1:0][63:0]        stare_au_data,
  input  logic [NLANE-1:0]              stare_au_last,
  output logic [NLANE-1:0]              stare_mac_valid,
  input  logic [NLANE-1:0]              stare_mac_ready,
  output logic [NLANE-1:0][63:0]        stare_mac_data,
  output logic [NLANE-1:0]              stare_mac_last,
  input  logic [NLANE-1:0]              stare_rx_valid,
  input  logic [NLANE-1:0][63:0]        stare_rx_data,
  input  logic [NLANE-1:0]              stare_rx_last,
  output logic [NLANE-1:0][4:0][31:0]   stare_counts,  // toggles, generator packets,
                                                       // acked, re-sent, frames
  // ---- GTS trigger processor ----
  input  logic                          tp_cfg_mode,
  input  ts_t                           tp_cfg_delay,
  input  logic [7:0]                    tp_cfg_nb_samples,
  input  logic [NLEAF-1:0]              tp_cfg_leaf_mask,
  input  logic [NLEAF-1:0][NPART-1:0]   tp_cfg_assign,
  input  logic [NPART-1:0][15:0]        tp_cfg_mult_win,
  input  logic [NPART-1:0][8:0]         tp_cfg_threshold,
  input  logic [NPART-1:0][15:0]        tp_cfg_acc_width,
  input  logic [NPART-1:0][15:0]        tp_cfg_coinc_delay,
  input  logic [NPART-1:0][15:0]        tp_cfg_coinc_width,
  input  logic [(1<<NPART)-1:0]         tp_cfg_le_table,
  input  logic [31:0]                   tp_cfg_timeout,
  input  logic                          tp_req_valid,
  input  gts_req_t                      tp_req,
  output logic                          tp_rep_valid,
  input  logic                          tp_rep_ready,
  output gts_reply_t                    tp_rep,
  output ts_t                           tp_ts,
  output logic                          tp_ts_valid,
  output logic [1:0]                    tp_ts_state,
  output logic [2:0][31:0]              tp_counts      // accepted, rejected, late
);
  pace_firmware #(.LINES(LINES), .CH(CH), .NENG(NLANE)) u_pace (
    .clk, .rst_n, .agg_valid, .agg_data, .agg_mark, .cfg(pace_cfg), .cfg_baseline(pace_baseline),
    .leaf_id(pace_leaf_id), .ts_load(pace_ts_load), .ts_load_val(pace_ts_load_val),
    .lt_req(pace_lt_req), .lt_ch(pace_lt_ch), .lt_len(pace_lt_len), .sp_clear(pace_sp_clear),
    .sp_req(pace_sp_req), .sp_ch(pace_sp_ch), .mon_arm(pace_mon_arm), .sys_off(pace_sys_off),
    .err(pace_err), .backpressure(pace_backpressure),
    .gts_req_valid(pace_gts_req_valid), .gts_req_ready(pace_gts_req_ready),
    .gts_req(pace_gts_req), .gts_rep_valid(pace_gts_rep_valid), .gts_rep(pace_gts_rep),
    .ro_valid(pace_ro_valid), .ro_ready(pace_ro_ready), .ro_data(pace_ro_data),
    .ro_last(pace_ro_last), .link_locked(pace_link_locked), .ts(pace_ts),
    .n_triggers(pace_counts[0]), .n_inhibited(pace_counts[1]), .n_events(pace_counts[2]),
    .n_readout(pace_counts[3]), .n_rejected(pace_counts[4]), .n_timeouts(pace_counts[5]),
    .n_idle_frames(pace_counts[6]));

  logic [NLANE-1:0][31:0] s_tog, s_gen, s_ack, s_retx, s_frm;
  stare_firmware #(.NLANES(NLANE)) u_stare (
    .clk, .rst_n, .cfg_buf_bytes(stare_buf_bytes), .cfg_gen_enable(stare_gen_enable),
    .cfg_gen_words(stare_gen_words), .cfg_rudp_enable(stare_rudp_enable),
    .cfg_rudp_timeout(stare_rudp_timeout), .cfg_src_mac(stare_src_mac),
    .cfg_dst_mac(stare_dst_mac), .cfg_src_ip(stare_src_ip), .cfg_dst_ip(stare_dst_ip),
    .cfg_src_port(stare_src_port), .cfg_dst_port(stare_dst_port),
    .au_valid(stare_au_valid), .au_ready(stare_au_ready), .au_data(stare_au_data),
    .au_last(stare_au_last), .mac_valid(stare_mac_valid), .mac_ready(stare_mac_ready),
    .mac_data(stare_mac_data), .mac_last(stare_mac_last), .rx_valid(stare_rx_valid),
    .rx_data(stare_rx_data), .rx_last(stare_rx_last), .n_toggles(s_tog),
    .n_gen_packets(s_gen), .n_acked(s_ack), .n_retx(s_retx), .n_frames(s_frm));
  always_comb
    for (int l = 0; l < int'(NLANE); l++)
      stare_counts[l] = {s_frm[l], s_retx[l], s_ack[l], s_gen[l], s_tog[l]};

  logic [NPART-1:0] coinc;
  logic             le_met;
  gts_trigger_processor #(.NLEAF(NLEAF), .NPART(NPART)) u_tp (
    .clk, .rst_n, .cfg_mode(tp_cfg_mode), .cfg_delay(tp_cfg_delay),
    .cfg_nb_samples(tp_cfg_nb_samples), .cfg_leaf_mask(tp_cfg_leaf_mask),
    .cfg_assign(tp_cfg_assign), .cfg_mult_win(tp_cfg_mult_win),
    .cfg_threshold(tp_cfg_threshold), .cfg_acc_width(tp_cfg_acc_width),
    .cfg_coinc_delay(tp_cfg_coinc_delay), .cfg_coinc_width(tp_cfg_coinc_width),
    .cfg_le_table(tp_cfg_le_table), .cfg_timeout(tp_cfg_timeout), .req_valid(tp_req_valid),
    .req(tp_req), .rep_valid(tp_rep_valid), .rep_ready(tp_rep_ready), .rep(tp_rep),
    .ts(tp_ts), .ts_valid(tp_ts_valid), .ts_state(tp_ts_state), .coinc, .le_met,
    .n_accepted(tp_counts[0]), .n_rejected(tp_counts[1]), .n_late(tp_counts[2]));
endmodule
