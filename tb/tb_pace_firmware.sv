// Testbench for pace_firmware with all 38 channels on ten aggregated lines and the four
// readout engines, at reduced memory sizes (MWD window up to 200, long trace 400, spectra
// of 256 bins, monitor 1024 samples). The ADC model sends steps on every channel; the
// testbench plays the GTS tree: it accepts, rejects or ignores the trigger requests in turn.
// Engine 0 carries events, 1 long traces, 2 spectra, 3 the monitor, as set by cfg.route.
// It checks that the links lock; that each pulse gives one trigger request with the
// firmware's timestamp; that accepted events are read out with the right timestamp, with
// 38 energies equal to the step heights (L = 32 and a shift of 5 make the energy the step,
// within 2 %) and 38 traces that show the step; that rejected and unanswered events are
// dropped and counted; that no request leaves while backpressure is set (the trigger is
// counted as inhibited); that long trace, spectrum and monitor frames arrive whole on their
// engines, the spectrum holding every triggered core energy in its bin; and that IDLE
// frames appear while nothing else is sent.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_pace_firmware;
  import agata_pkg::*;
  localparam int LINES = 10, CH = 38, NENG = 4, BINS = 256;
  typedef logic [63:0] words_t [$];
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [LINES-1:0] agg_valid, agg_mark;
  logic [LINES-1:0][15:0] agg_data;
  pace_cfg_t cfg;
  logic [CH-1:0][15:0] cfg_baseline;
  logic [LEAF_W-1:0] leaf_id = 8'd17;
  logic ts_load = 0, lt_req = 0, sp_clear = 0, sp_req = 0, mon_arm = 0, sys_off = 0, err = 0, backpressure = 0;
  ts_t ts_load_val = 48'd1_000_000;
  logic [7:0] lt_ch = '0, sp_ch = '0;
  logic [15:0] lt_len = '0;
  logic gts_req_valid, gts_req_ready = 1, gts_rep_valid = 0;
  gts_req_t gts_req;
  gts_reply_t gts_rep = '0;
  logic [NENG-1:0] ro_valid, ro_ready = '0, ro_last;
  logic [NENG-1:0][63:0] ro_data;
  logic [LINES-1:0] link_locked;
  ts_t ts;
  logic [31:0] n_triggers, n_inhibited, n_events, n_readout, n_rejected, n_timeouts, n_idle_frames;
  int checks = 0, failures = 0;
  words_t cur [NENG];
  words_t frames [NENG][$];
  gts_req_t reqs [$];

  pace_firmware #(.LINES(LINES), .CH(CH), .NENG(NENG), .MAX_M(200), .SLOTS(8), .LT_DEPTH(400),
                  .BINS(BINS), .MON_DEPTH(1024)) dut (.*);
  adc_source #(.LINES(LINES), .CH(CH)) u_adc (.clk, .rst_n, .agg_valid, .agg_data, .agg_mark);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  // readout engines: collect frames; GTS requests
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NENG; e++)
      if (ro_valid[e] && ro_ready[e]) begin
        cur[e].push_back(ro_data[e]);
        if (ro_last[e]) begin
          if (ro_data[e][63:56] != PKT_IDLE || cur[e].size() > 1) frames[e].push_back(cur[e]);
          cur[e] = {};
        end
      end
    if (gts_req_valid && gts_req_ready) reqs.push_back(gts_req);
  end
  always @(negedge clk) ro_ready = {($urandom_range(0, 3) != 0), ($urandom_range(0, 3) != 0),
                                    ($urandom_range(0, 3) != 0), ($urandom_range(0, 3) != 0)};
  function automatic int amp(input int c); return 600 + 37 * c; endfunction
  task automatic fire();
    for (int c = 0; c < CH; c++) u_adc.pulse(c, amp(c));
  endtask
  task automatic reply(input gts_req_t r, input logic acc);
    @(negedge clk); gts_rep_valid = 1; gts_rep.leaf = r.leaf; gts_rep.ts = r.ts; gts_rep.accept = acc;
    @(negedge clk); gts_rep_valid = 0;
  endtask
  // one event frame: engine header, event header, energies, traces
  task automatic check_event(input words_t f, input ts_t t);
    int ew = (CH + 3) / 4;
    chk(f[0][63:56] == PKT_EVENT, "event frame type");
    chk(f.size() == 2 + ew + CH * 25, $sformatf("event frame size %0d", f.size()));
    if (f.size() != 2 + ew + CH * 25) return;
    chk(f[1][63:16] == t && f[1][7:0] == 8'd100, "event timestamp");
    for (int c = 0; c < CH; c++) begin
      int e = int'(f[2 + c / 4][16 * (c % 4) +: 16]);
      chk(e > amp(c) * 98 / 100 && e < amp(c) * 102 / 100, $sformatf("ch%0d energy %0d of %0d", c, e, amp(c)));
    end
    for (int c = 0; c < CH; c++) begin
      logic [63:0] w0 = f[2 + ew + c * 25], w9 = f[2 + ew + c * 25 + 9];
      chk(int'(w9[63:48]) - int'(w0[15:0]) > amp(c) * 9 / 10, $sformatf("ch%0d trace shows the step", c));
    end
  endtask

  initial begin
    cfg = '0;
    cfg.trig_ch = 8'd0; cfg.threshold = 16'd300; cfg.cfd_delay = 5'd2; cfg.cfd_diff = 5'd15; cfg.cfd_frac = 8'd64;
    cfg.mwd_m = 11'd150; cfg.mwd_l = 11'd32; cfg.mwd_k = 24'((64'd1 << 24) / 5000); cfg.peak = 11'd60;
    cfg.e_shift = 6'd5; cfg.ev_pre = 6'd10; cfg.ev_timeout = 32'd3000; cfg.sp_shift = 4'd3;
    cfg.idle_period = 16'd2000; cfg.route = '{2'd3, 2'd2, 2'd1, 2'd0}; cfg.mon_ch = 8'd3; cfg.mon_len = 16'd512;
    for (int c = 0; c < CH; c++) cfg_baseline[c] = 16'd1000;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); ts_load = 1; @(negedge clk); ts_load = 0;
    wait (!dut.sp_busy);
    repeat (2000) @(negedge clk);
    chk(&link_locked, "links locked");
    // 1 accepted, 2 rejected, 3 unanswered (time-out), 4 accepted
    for (int i = 0; i < 4; i++) begin
      int nr;
      nr = reqs.size();
      fire();
      repeat (200) @(negedge clk);
      chk(reqs.size() == nr + 1, "one request per pulse");
      if (reqs.size() == nr + 1) begin
        chk(reqs[nr].leaf == leaf_id && reqs[nr].ts > 48'd1_000_000 && reqs[nr].ts <= ts, "request leaf and timestamp");
        if (i != 2) reply(reqs[nr], i != 1);
      end
      repeat (14000) @(negedge clk);
    end
    chk(n_triggers == 4 && n_events == 4, "four events");
    chk(n_rejected == 1 && n_timeouts == 1 && n_readout == 2, "reject, time-out, readout counts");
    chk(frames[0].size() == 2, $sformatf("two event frames, %0d", frames[0].size()));
    if (frames[0].size() == 2) begin
      check_event(frames[0][0], reqs[0].ts);
      check_event(frames[0][1], reqs[3].ts);
    end
    // backpressure
    backpressure = 1;
    fire(); repeat (3000) @(negedge clk);
    chk(n_inhibited == 1 && reqs.size() == 4, "inhibited while backpressure");
    backpressure = 0;
    repeat (12000) @(negedge clk);
    // long trace, spectrum, monitor
    @(negedge clk); lt_req = 1; lt_ch = 8'd5; lt_len = 16'd100; @(negedge clk); lt_req = 0;
    @(negedge clk); sp_req = 1; sp_ch = 8'd0; @(negedge clk); sp_req = 0;
    @(negedge clk); mon_arm = 1; @(negedge clk); mon_arm = 0;
    repeat (6000) @(negedge clk);
    chk(frames[1].size() == 1 && frames[1][0].size() == 2 + 25 && frames[1][0][0][63:56] == PKT_LONGTRACE,
        "long trace frame");
    chk(frames[2].size() == 1 && frames[2][0].size() == 2 + BINS / 2 && frames[2][0][0][63:56] == PKT_SPECTRUM,
        "spectrum frame");
    if (frames[2].size() == 1) begin
      int b = (amp(0) * 32 / 32) >> 3, tot = 0, at = 0;
      for (int w = 0; w < BINS / 2; w++) begin
        tot += int'(frames[2][0][2 + w][31:0]) + int'(frames[2][0][2 + w][63:32]);
        for (int h = 0; h < 2; h++) if (2 * w + h >= b - 2 && 2 * w + h <= b + 2) at += int'(frames[2][0][2 + w][32 * h +: 32]);
      end
      chk(tot == int'(n_triggers) && at == tot, $sformatf("spectrum counts %0d near bin %0d: %0d", tot, b, at));
    end
    chk(frames[3].size() == 1 && frames[3][0].size() == 2 + 128 && frames[3][0][0][63:56] == PKT_MONITOR,
        "monitor frame");
    chk(n_idle_frames > 0, "idle frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
