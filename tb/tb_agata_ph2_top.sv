// End-to-end testbench of agata_ph2_top at its full default size: ten aggregated ADC lines
// with 38 channels, the complete pre-processing firmware, four STARE lanes and a trigger
// processor for 256 leaves. The testbench closes the loops the way the system is cabled:
// readout engine e feeds STARE lane e over its Aurora input; the firmware's trigger requests
// go to the trigger processor and its answers come back; a second crystal (leaf 18) is
// modelled by the testbench, which can send a request in coincidence with the firmware's;
// each STARE lane talks to a server model, and lane 0's server drops the first transmission
// of every fifth packet. The run walks through: timestamp learning (events then go
// unanswered and time out), events in coincidence (validated, read out and delivered to the
// server), lone events (rejected), a trigger inhibited by backpressure, the switch from CFD
// to leading-edge triggering, long trace, spectrum and monitor readout (the spectrum and
// monitor frames are longer than a STARE packet and are sliced), the counter data generator
// on lane 3, and IDLE frames while nothing else is sent. Each of these mechanisms is counted
// and one that never happened counts as a failure.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_agata_ph2_top;
  import agata_pkg::*;
  localparam int LINES = 10, CH = 38, NL = 4, NLEAF = 256, NPART = 8;
  localparam int PACE_LEAF = 17, OTHER_LEAF = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // PACE
  logic [LINES-1:0] agg_valid, agg_mark;
  logic [LINES-1:0][15:0] agg_data;
  pace_cfg_t pace_cfg;
  logic [CH-1:0][15:0] pace_baseline;
  logic [LEAF_W-1:0] pace_leaf_id = 8'(PACE_LEAF);
  logic pace_ts_load = 0, pace_lt_req = 0, pace_sp_clear = 0, pace_sp_req = 0, pace_mon_arm = 0;
  logic pace_sys_off = 0, pace_err = 0, pace_backpressure = 0;
  ts_t pace_ts_load_val = 48'd5_000_000;
  logic [7:0] pace_lt_ch = '0, pace_sp_ch = '0;
  logic [15:0] pace_lt_len = '0;
  logic pace_gts_req_valid, pace_gts_req_ready, pace_gts_rep_valid;
  gts_req_t pace_gts_req;
  gts_reply_t pace_gts_rep;
  logic [NL-1:0] pace_ro_valid, pace_ro_ready, pace_ro_last;
  logic [NL-1:0][63:0] pace_ro_data;
  logic [LINES-1:0] pace_link_locked;
  ts_t pace_ts;
  logic [6:0][31:0] pace_counts;
  // STARE
  logic [15:0] stare_buf_bytes = 16'd16384, stare_gen_words = 16'd500;
  logic [15:0] stare_src_port = 16'd30000, stare_dst_port = 16'd30100;
  logic [NL-1:0] stare_gen_enable = '0;
  logic stare_rudp_enable = 1;
  logic [31:0] stare_rudp_timeout = 32'd6000, stare_src_ip = 32'h0A010001;
  logic [47:0] stare_src_mac = 48'h020000010001;
  logic [NL-1:0][47:0] stare_dst_mac;
  logic [NL-1:0][31:0] stare_dst_ip;
  logic [NL-1:0] stare_au_valid, stare_au_ready, stare_au_last;
  logic [NL-1:0][63:0] stare_au_data;
  logic [NL-1:0] stare_mac_valid, stare_mac_ready, stare_mac_last, stare_rx_valid, stare_rx_last;
  logic [NL-1:0][63:0] stare_mac_data, stare_rx_data;
  logic [NL-1:0][4:0][31:0] stare_counts;
  // trigger processor
  logic tp_cfg_mode = 0;
  ts_t tp_cfg_delay = '0;
  logic [7:0] tp_cfg_nb_samples = 8'd2;
  logic [NLEAF-1:0] tp_cfg_leaf_mask = '0;
  logic [NLEAF-1:0][NPART-1:0] tp_cfg_assign = '0;
  logic [NPART-1:0][15:0] tp_cfg_mult_win, tp_cfg_acc_width, tp_cfg_coinc_delay, tp_cfg_coinc_width;
  logic [NPART-1:0][8:0] tp_cfg_threshold;
  logic [255:0] tp_cfg_le_table;
  logic [31:0] tp_cfg_timeout = 32'd3000;
  logic tp_req_valid, tp_rep_valid, tp_rep_ready = 1, tp_ts_valid;
  gts_req_t tp_req;
  gts_reply_t tp_rep;
  ts_t tp_ts;
  logic [1:0] tp_ts_state;
  logic [2:0][31:0] tp_counts;

  agata_ph2_top dut (.*);
  adc_source #(.LINES(LINES), .CH(CH)) u_adc (.clk, .rst_n, .agg_valid, .agg_data, .agg_mark);
  for (genvar l = 0; l < NL; l++) begin : g_srv
    stare_server #(.DROP_MOD(l == 0 ? 5 : 0), .DROP_AT(2), .ACK_DELAY(200)) u_srv (
      .clk, .rst_n, .mac_valid(stare_mac_valid[l]), .mac_ready(stare_mac_ready[l]),
      .mac_data(stare_mac_data[l]), .mac_last(stare_mac_last[l]), .rx_valid(stare_rx_valid[l]),
      .rx_data(stare_rx_data[l]), .rx_last(stare_rx_last[l]));
  end

  // cabling: readout engines to STARE lanes, trigger requests and answers
  assign stare_au_valid = pace_ro_valid;
  assign stare_au_data  = pace_ro_data;
  assign stare_au_last  = pace_ro_last;
  assign pace_ro_ready  = stare_au_ready;
  logic other_valid = 0;
  gts_req_t other_req = '0;
  assign tp_req_valid       = pace_gts_req_valid || other_valid;
  assign tp_req             = pace_gts_req_valid ? pace_gts_req : other_req;
  assign pace_gts_req_ready = 1'b1;
  assign pace_gts_rep_valid = tp_rep_valid;
  assign pace_gts_rep       = tp_rep;

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  typedef enum int {M_LEARN, M_TIMEOUT, M_ACCEPT, M_REJECT, M_INHIBIT, M_CFD, M_LE, M_READOUT,
                    M_DELIVERED, M_LONGTRACE, M_SPECTRUM, M_MONITOR, M_SLICE, M_TOGGLE, M_RETX,
                    M_GENERATOR, M_IDLE, M_NUM} mech_t;
  int mech [M_NUM];
  string mname [M_NUM] = '{"timestamp learning", "event time-out", "validation", "rejection",
                           "backpressure inhibit", "CFD trigger", "leading-edge trigger",
                           "event readout", "event delivered to server", "long trace",
                           "spectrum", "monitor", "packet slicing", "buffer toggle",
                           "re-transmission", "generator packets", "IDLE frame"};
  int other_ok = 0;
  // frame types seen leaving each engine
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NL; e++) if (pace_ro_valid[e] && pace_ro_ready[e]) begin
      if (hdr_next[e]) begin
        case (pace_ro_data[e][63:56])
          PKT_LONGTRACE: mech[M_LONGTRACE]++;
          PKT_SPECTRUM:  mech[M_SPECTRUM]++;
          PKT_MONITOR:   mech[M_MONITOR]++;
          PKT_IDLE:      mech[M_IDLE]++;
          default: ;
        endcase
      end
      hdr_next[e] = pace_ro_last[e];
    end
    if (tp_rep_valid && tp_rep_ready && tp_rep.leaf == 8'(OTHER_LEAF) && tp_rep.accept) other_ok++;
  end
  bit hdr_next [NL] = '{1, 1, 1, 1};

  function automatic int amp(input int c); return 800 + 29 * c; endfunction
  task automatic fire(input bit with_partner);
    int nreq;
    nreq = int'(pace_counts[0]);
    for (int c = 0; c < CH; c++) u_adc.pulse(c, amp(c));
    if (with_partner) begin
      // the other crystal fires at the same time
      wait (pace_gts_req_valid);
      other_req.leaf = 8'(OTHER_LEAF); other_req.ts = pace_gts_req.ts;
      @(negedge clk);
      while (pace_gts_req_valid) @(negedge clk);
      other_valid = 1; @(negedge clk); other_valid = 0;
    end
    repeat (300) @(negedge clk);
  endtask

  initial begin
    int trig0, ev_ok, words0;
    for (int l = 0; l < NL; l++) begin
      stare_dst_mac[l] = 48'h020000020000 + 48'(l); stare_dst_ip[l] = 32'h0A010100 + 32'(l);
    end
    tp_cfg_leaf_mask[PACE_LEAF] = 1; tp_cfg_leaf_mask[OTHER_LEAF] = 1;
    tp_cfg_assign[PACE_LEAF] = 8'h01; tp_cfg_assign[OTHER_LEAF] = 8'h01;
    for (int p = 0; p < NPART; p++) begin
      tp_cfg_mult_win[p] = 16'd50; tp_cfg_threshold[p] = 9'd2; tp_cfg_acc_width[p] = 16'd200;
      tp_cfg_coinc_delay[p] = 16'd0; tp_cfg_coinc_width[p] = 16'd20;
    end
    for (int k = 0; k < 256; k++) tp_cfg_le_table[k] = k[0];
    pace_cfg = '0;
    pace_cfg.trig_ch = 8'd0; pace_cfg.threshold = 16'd300; pace_cfg.cfd_delay = 5'd2; pace_cfg.cfd_diff = 5'd15;
    pace_cfg.cfd_frac = 8'd64; pace_cfg.mwd_m = 11'd1000; pace_cfg.mwd_l = 11'd32;
    pace_cfg.mwd_k = 24'((64'd1 << 24) / 5000); pace_cfg.peak = 11'd60; pace_cfg.e_shift = 6'd5;
    pace_cfg.ev_pre = 6'd10; pace_cfg.ev_timeout = 32'd2500; pace_cfg.sp_shift = 4'd1;
    pace_cfg.idle_period = 16'd20000; pace_cfg.route = '{2'd3, 2'd2, 2'd1, 2'd0};
    pace_cfg.mon_ch = 8'd0; pace_cfg.mon_sel = 2'd0; pace_cfg.mon_len = 16'd16384;
    for (int c = 0; c < CH; c++) pace_baseline[c] = 16'd1000;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); pace_ts_load = 1; @(negedge clk); pace_ts_load = 0;
    // spectra are cleared after reset: CH x BINS clocks
    wait (!dut.u_pace.sp_busy);
    repeat (1000) @(negedge clk);
    chk(&pace_link_locked, "links locked");

    // 1. timestamp learning: two requests from each crystal; the events get no answer
    chk(tp_ts_state == 2'd1, "trigger processor learning");
    for (int i = 0; i < 2; i++) begin fire(1); repeat (13000) @(negedge clk); end
    repeat (100) @(negedge clk);
    if (tp_ts_state == 2'd2 && tp_ts_valid) mech[M_LEARN]++;
    mech[M_TIMEOUT] = int'(pace_counts[5]);
    chk(pace_counts[5] == 2, "events during learning time out");

    // 2. events in coincidence are validated; 3. lone events are rejected
    for (int i = 0; i < 3; i++) begin fire(1); repeat (14000) @(negedge clk); end
    for (int i = 0; i < 2; i++) begin fire(0); repeat (14000) @(negedge clk); end
    mech[M_ACCEPT] = other_ok;
    mech[M_REJECT] = int'(pace_counts[4]);
    mech[M_READOUT] = int'(pace_counts[3]);
    chk(pace_counts[3] == 3 && pace_counts[4] == 2, "3 validated and read out, 2 rejected");
    mech[M_CFD] = int'(pace_counts[0]);

    // 4. backpressure
    pace_backpressure = 1; fire(0); repeat (13000) @(negedge clk); pace_backpressure = 0;
    mech[M_INHIBIT] = int'(pace_counts[1]);

    // 5. leading-edge triggering
    trig0 = int'(pace_counts[0]);
    pace_cfg.le_mode = 1;
    fire(1); repeat (14000) @(negedge clk);
    mech[M_LE] = int'(pace_counts[0]) - trig0;
    pace_cfg.le_mode = 0;
    chk(pace_counts[3] == 4, "leading-edge event read out");

    // 6. long trace, spectrum, monitor
    @(negedge clk); pace_lt_req = 1; pace_lt_ch = 8'd1; pace_lt_len = 16'd4000; @(negedge clk); pace_lt_req = 0;
    @(negedge clk); pace_sp_req = 1; pace_sp_ch = 8'd0; @(negedge clk); pace_sp_req = 0;
    @(negedge clk); pace_mon_arm = 1; @(negedge clk); pace_mon_arm = 0;
    repeat (90000) @(negedge clk);

    // 7. counter data generator on lane 3
    stare_gen_enable[3] = 1; repeat (20000) @(negedge clk); stare_gen_enable[3] = 0;
    repeat (30000) @(negedge clk);

    // delivery and STARE statistics
    words0 = 0;
    foreach (g_srv[0].u_srv.psize[k]) words0 += g_srv[0].u_srv.psize[k];
    ev_ok = 1 + (CH + 3) / 4 + CH * 25 + 1;          // engine header + event
    if (words0 >= 4 * ev_ok) mech[M_DELIVERED] = words0 / ev_ok;
    chk(words0 >= 4 * ev_ok, $sformatf("event words at the server: %0d", words0));
    for (int l = 0; l < NL; l++) begin
      mech[M_TOGGLE] += int'(stare_counts[l][0]);
      mech[M_RETX]   += int'(stare_counts[l][3]);
    end
    mech[M_GENERATOR] = int'(stare_counts[3][1]);
    // more packets than buffers on the spectrum and monitor lanes means buffers were sliced
    mech[M_SLICE] = int'(dut.u_stare.g_lane[2].u_lane.s_seq) - int'(stare_counts[2][0])
                  + int'(dut.u_stare.g_lane[3].u_lane.s_seq) - int'(stare_counts[3][0]);
    chk(g_srv[0].u_srv.n_dropped > 0 && g_srv[0].u_srv.n_dup == 0, "lane 0: dropped frames re-sent once");
    chk(dut.u_stare.g_lane[0].u_lane.active == 0 && dut.u_stare.g_lane[1].u_lane.active == 0
        && dut.u_stare.g_lane[2].u_lane.active == 0 && dut.u_stare.g_lane[3].u_lane.active == 0,
        "all packets acknowledged");

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-28s %0d", mname[m], mech[m]);
      chk(mech[m] > 0, {"mechanism never happened: ", mname[m]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
