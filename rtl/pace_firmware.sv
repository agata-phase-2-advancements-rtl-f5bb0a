// pace_firmware: the pre-processing firmware of one AGATA crystal (PACE-CAP board).
// LINES aggregated input lines (ten in the document) are split 4-to-1 by tdm_deagg into the
// sample links; the first CH of them (38: 36 segments and the two core gains) feed one
// datapath each. Line 0's group strobe is the 100 MHz sample strobe for everything else; the
// lines are assumed to arrive aligned. The discriminator of channel cfg.trig_ch (the core)
// drives the GTS leaf, which timestamps the trigger, sends the request to the GTS tree and,
// unless backpressure or a full event memory inhibits it, starts an event: every datapath
// captures its energy and the event memory records traces, energies, timestamp and fine
// time until the GTS answer validates, rejects or times out the event. Long-trace, spectra
// and monitor memories work alongside on the same data. Four readout engines frame the
// enabled memory blocks (cfg.route picks an engine for each) into packets on four 64-bit
// streams, one per Aurora link to STARE. Slow-control registers and commands are plain
// ports. The block structure follows the document's firmware overview; the wiring details
// (aligned lines, routing register, monitor signal choice) are this design's.
// Timing: one clock drives everything; samples advance on the group strobe of the
// de-aggregators, one sample per channel per strobe; readout streams move one word per clock.
module pace_firmware
  import agata_pkg::*;
#(
  parameter int unsigned LINES        = 10,
  parameter int unsigned CH           = 38,
  parameter int unsigned NENG         = 4,
  parameter int unsigned MAX_M        = 2000,
  parameter int unsigned SLOTS        = 8,
  parameter int unsigned LT_DEPTH     = 4000,
  parameter int unsigned BINS         = 4096,
  parameter int unsigned MON_DEPTH    = 16384
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // aggregated sample lines
  input  logic [LINES-1:0]             agg_valid,
  input  logic [LINES-1:0][15:0]       agg_data,
  input  logic [LINES-1:0]             agg_mark,
  // slow control
  input  pace_cfg_t                    cfg,
  input  logic [CH-1:0][15:0]          cfg_baseline,
  input  logic [LEAF_W-1:0]            leaf_id,
  input  logic                         ts_load,
  input  ts_t                          ts_load_val,
  input  logic                         lt_req,
  input  logic [7:0]                   lt_ch,
  input  logic [15:0]                  lt_len,
  input  logic                         sp_clear,
  input  logic                         sp_req,
  input  logic [7:0]                   sp_ch,
  input  logic                         mon_arm,
  input  logic                         sys_off,
  input  logic                         err,
  input  logic                         backpressure,
  // GTS tree
  output logic                         gts_req_valid,
  input  logic                         gts_req_ready,
  output gts_req_t                     gts_req,
  input  logic                         gts_rep_valid,
  input  gts_reply_t                   gts_rep,
  // Aurora links to STARE
  output logic [NENG-1:0]              ro_valid,
  input  logic [NENG-1:0]              ro_ready,
  output logic [NENG-1:0][63:0]        ro_data,
  output logic [NENG-1:0]              ro_last,
  // status
  output logic [LINES-1:0]             link_locked,
  output ts_t                          ts,
  output logic [31:0]                  n_triggers,
  output logic [31:0]                  n_inhibited,
  output logic [31:0]                  n_events,
  output logic [31:0]                  n_readout,
  output logic [31:0]                  n_rejected,
  output logic [31:0]                  n_timeouts,
  output logic [31:0]                  n_idle_frames
);
  localparam int unsigned NSRC = 4;  // event, long trace, spectra, monitor
  localparam int unsigned MA   = $clog2(MAX_M + 1);

  // ---------------- link de-aggregation ----------------
  logic [LINES-1:0]                 grp_valid;
  logic [LINES-1:0][3:0][15:0]      grp_data;
  logic [LINES-1:0][15:0]           align_err;
  for (genvar g = 0; g < int'(LINES); g++) begin : g_link
    tdm_deagg #(.LANES(4), .W(16)) u_deagg (
      .clk, .rst_n, .in_valid(agg_valid[g]), .in_data(agg_data[g]), .in_mark(agg_mark[g]),
      .out_valid(grp_valid[g]), .out_data(grp_data[g]), .locked(link_locked[g]),
      .align_errors(align_err[g]));
  end
  logic smp_en;
  logic [CH-1:0][15:0] samples;
  assign smp_en = grp_valid[0];
  always_comb for (int c = 0; c < int'(CH); c++) samples[c] = grp_data[c / 4][c % 4];

  // ---------------- datapaths ----------------
  logic [CH-1:0]                 dp_trig, e_valid;
  logic [CH-1:0][7:0]            dp_fine;
  logic [CH-1:0][17:0]           dp_cfd;
  logic [CH-1:0][47:0]           dp_trap;
  logic [CH-1:0][15:0]           energy;
  logic                          evt_trig;
  ts_t                           evt_ts;
  for (genvar c = 0; c < int'(CH); c++) begin : g_dp
    datapath #(.W(16), .MAX_M(MAX_M), .MAX_L(MAX_M), .MAX_D(16), .MAX_DF(16), .E_W(16)) u_dp (
      .clk, .rst_n, .smp_en, .x(samples[c]),
      .cfg_le_mode(cfg.le_mode), .cfg_threshold(cfg.threshold), .cfg_delay(cfg.cfd_delay),
      .cfg_diff(cfg.cfd_diff), .cfg_frac(cfg.cfd_frac), .cfg_baseline(cfg_baseline[c]),
      .cfg_m(MA'(cfg.mwd_m)), .cfg_l(MA'(cfg.mwd_l)), .cfg_k(cfg.mwd_k),
      .cfg_peak(MA'(cfg.peak)), .cfg_shift(cfg.e_shift), .evt_trig,
      .trig(dp_trig[c]), .fine(dp_fine[c]), .cfd_out(dp_cfd[c]), .trap(dp_trap[c]),
      .e_valid(e_valid[c]), .energy(energy[c]));
  end

  // ---------------- GTS leaf ----------------
  logic local_trig, mem_full, val_valid, val_accept;
  ts_t  val_ts;
  logic [31:0] n_req, n_acc, n_rej;
  localparam int unsigned CA = $clog2(CH);
  logic [CA-1:0] tch;
  assign tch        = (32'(cfg.trig_ch) < CH) ? CA'(cfg.trig_ch) : '0;
  assign local_trig = dp_trig[tch];
  gts_leaf u_leaf (
    .clk, .rst_n, .smp_en, .leaf_id, .ts_load, .ts_load_val, .ts, .local_trig, .backpressure,
    .mem_full, .evt_trig, .evt_ts, .req_valid(gts_req_valid), .req_ready(gts_req_ready),
    .req(gts_req), .rep_valid(gts_rep_valid), .rep(gts_rep), .val_valid, .val_ts, .val_accept,
    .n_requests(n_req), .n_accepted(n_acc), .n_rejected(n_rej), .n_inhibited);
  assign n_triggers = n_req;

  // ---------------- memories ----------------
  logic [NSRC-1:0]       s_valid, s_ready, s_last;
  logic [NSRC-1:0][63:0] s_data;
  logic [NSRC-1:0][7:0]  s_type;
  assign s_type = {PKT_MONITOR, PKT_SPECTRUM, PKT_LONGTRACE, PKT_EVENT};

  event_memory #(.CH(CH), .SLOTS(SLOTS), .SAMPLES(100), .LONG_SAMPLES(200), .MAX_PRE(64),
                 .E_W(16)) u_evm (
    .clk, .rst_n, .smp_en, .samples, .now_ts(ts), .cfg_long(cfg.ev_long), .cfg_pre(cfg.ev_pre),
    .cfg_timeout(cfg.ev_timeout), .evt_trig, .evt_ts,
    .evt_fine(dp_fine[tch]), .e_valid, .energy,
    .val_valid, .val_ts, .val_accept, .mem_full,
    .out_valid(s_valid[0]), .out_ready(s_ready[0]), .out_data(s_data[0]), .out_last(s_last[0]),
    .n_events, .n_readout, .n_rejected, .n_timeouts);

  logic lt_busy, sp_busy, mon_busy;
  long_trace #(.CH(CH), .DEPTH(LT_DEPTH)) u_lt (
    .clk, .rst_n, .smp_en, .samples, .req(lt_req), .req_ch(lt_ch), .req_len(lt_len),
    .busy(lt_busy), .out_valid(s_valid[1]), .out_ready(s_ready[1]), .out_data(s_data[1]),
    .out_last(s_last[1]));

  logic [31:0] sp_ovf, sp_drop;
  spectra #(.CH(CH), .BINS(BINS), .CNT_W(32), .E_W(16)) u_sp (
    .clk, .rst_n, .e_valid, .energy, .cfg_shift(cfg.sp_shift), .clear(sp_clear), .req(sp_req),
    .req_ch(sp_ch), .busy(sp_busy), .out_valid(s_valid[2]), .out_ready(s_ready[2]),
    .out_data(s_data[2]), .out_last(s_last[2]), .n_overflow(sp_ovf), .n_dropped(sp_drop));

  logic [15:0] mon_data;
  logic [CA-1:0] mch;
  assign mch = (32'(cfg.mon_ch) < CH) ? CA'(cfg.mon_ch) : '0;
  always_comb begin
    unique case (cfg.mon_sel)
      2'd0: mon_data = samples[mch];
      2'd1: mon_data = dp_cfd[mch][15:0];
      2'd2: mon_data = 16'(dp_trap[mch] >>> cfg.e_shift);
      default: mon_data = energy[mch];
    endcase
  end
  monitor #(.DEPTH(MON_DEPTH), .PKT_SAMPLES(4096)) u_mon (
    .clk, .rst_n, .arm(mon_arm), .cfg_len(cfg.mon_len), .in_valid(smp_en), .in_data(mon_data),
    .busy(mon_busy), .out_valid(s_valid[3]), .out_ready(s_ready[3]), .out_data(s_data[3]),
    .out_last(s_last[3]));

  // ---------------- readout engines ----------------
  logic [NENG-1:0][NSRC-1:0] e_ready;
  logic [NENG-1:0][31:0]     e_frames, e_idle;
  for (genvar e = 0; e < int'(NENG); e++) begin : g_eng
    logic [NSRC-1:0] en;
    for (genvar s = 0; s < int'(NSRC); s++) begin : g_en
      assign en[s] = (32'(cfg.route[s]) == e);
    end
    readout_engine #(.NSRC(NSRC), .ENGINE_ID(8'(e))) u_eng (
      .clk, .rst_n, .src_valid(s_valid & en), .src_ready(e_ready[e]), .src_data(s_data),
      .src_last(s_last), .src_type(s_type), .cfg_enable(en), .cfg_idle_period(cfg.idle_period),
      .sys_off, .err, .out_valid(ro_valid[e]), .out_ready(ro_ready[e]), .out_data(ro_data[e]),
      .out_last(ro_last[e]), .n_frames(e_frames[e]), .n_idle(e_idle[e]));
  end
  always_comb begin
    s_ready = '0;
    for (int e = 0; e < int'(NENG); e++) s_ready |= e_ready[e];
    n_idle_frames = '0;
    for (int e = 0; e < int'(NENG); e++) n_idle_frames += e_idle[e];
  end
endmodule
