// Rate test for pace_firmware at its default sizes (38 channels on ten lines, MWD up to 2000
// samples, eight event slots, 4000-sample long traces, 4096-bin spectra). The reference
// operating point is a 50 kHz level-0 trigger rate per crystal: 2000 clocks of 100 MHz
// between events. The ADC model fires a step on all 38 channels every 2000 clocks, EVENTS
// times; the testbench plays the GTS tree and validates every request REPLY_DELAY clocks
// after it leaves; engine 0 reads events and is always ready. Because the model gives one
// sample per channel every four clocks, the pulses are only 500 samples apart, so the
// exponential tails pile up: the MWD energies must still match the step heights.
// After reset the spectrum memory (38 x 4096 counters) is cleared, one counter per clock.
// Checks: one request per pulse and no inhibited trigger; every event read out in a whole
// frame with its timestamp and the 38 step heights as energies (within 2 %); all frames out
// within 2000 clocks of the last pulse, so the event path keeps pace with 50 kHz.
// Timing: a clock period of 10 time units stands for the 10 ns of 100 MHz; a watchdog ends
// the run with a failure counted if the test has not finished after a fixed number of cycles.
module tb_pace_rate;
  import agata_pkg::*;
  localparam int LINES = 10, CH = 38, NENG = 4, EVENTS = 16, PERIOD = 2000, REPLY_DELAY = 100;
  typedef logic [63:0] words_t [$];
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [LINES-1:0] agg_valid, agg_mark;
  logic [LINES-1:0][15:0] agg_data;
  pace_cfg_t cfg;
  logic [CH-1:0][15:0] cfg_baseline;
  logic [LEAF_W-1:0] leaf_id = 8'd3;
  logic ts_load = 0, lt_req = 0, sp_clear = 0, sp_req = 0, mon_arm = 0, sys_off = 0, err = 0, backpressure = 0;
  ts_t ts_load_val = 48'd5_000_000;
  logic [7:0] lt_ch = '0, sp_ch = '0;
  logic [15:0] lt_len = '0;
  logic gts_req_valid, gts_req_ready = 1, gts_rep_valid = 0;
  gts_req_t gts_req;
  gts_reply_t gts_rep = '0;
  logic [NENG-1:0] ro_valid, ro_ready = '1, ro_last;
  logic [NENG-1:0][63:0] ro_data;
  logic [LINES-1:0] link_locked;
  ts_t ts;
  logic [31:0] n_triggers, n_inhibited, n_events, n_readout, n_rejected, n_timeouts, n_idle_frames;
  int checks = 0, failures = 0;
  words_t cur;
  words_t frames [$];
  gts_req_t reqs [$];
  longint req_t [$];

  pace_firmware dut (.*);
  adc_source #(.LINES(LINES), .CH(CH)) u_adc (.clk, .rst_n, .agg_valid, .agg_data, .agg_mark);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic int amp(input int c); return 500 + 29 * c; endfunction
  always @(posedge clk) if (rst_n) begin
    if (ro_valid[0] && ro_ready[0]) begin
      cur.push_back(ro_data[0]);
      if (ro_last[0]) begin
        if (ro_data[0][63:56] != PKT_IDLE || cur.size() > 1) frames.push_back(cur);
        cur = {};
      end
    end
    if (gts_req_valid && gts_req_ready) begin reqs.push_back(gts_req); req_t.push_back(longint'($time / 10)); end
  end
  // GTS tree model: validate each request REPLY_DELAY clocks after it was sent
  initial begin
    int k;
    k = 0;
    forever begin
      @(negedge clk);
      if (k < reqs.size() && longint'($time / 10) >= req_t[k] + REPLY_DELAY) begin
        gts_rep_valid = 1; gts_rep.leaf = reqs[k].leaf; gts_rep.ts = reqs[k].ts; gts_rep.accept = 1;
        @(negedge clk); gts_rep_valid = 0;
        k++;
      end
    end
  end

  initial begin
    longint t_end;
    int ew;
    ew = (CH + 3) / 4;
    cfg = '0;
    cfg.trig_ch = 8'd0; cfg.threshold = 16'd250; cfg.cfd_delay = 5'd2; cfg.cfd_diff = 5'd15; cfg.cfd_frac = 8'd64;
    cfg.mwd_m = 11'd150; cfg.mwd_l = 11'd32; cfg.mwd_k = 24'((64'd1 << 24) / 5000); cfg.peak = 11'd60;
    cfg.e_shift = 6'd5; cfg.ev_pre = 6'd10; cfg.ev_timeout = 32'd3000; cfg.sp_shift = 4'd3;
    cfg.idle_period = 16'd0; cfg.route = '{2'd3, 2'd2, 2'd1, 2'd0}; cfg.mon_ch = 8'd3; cfg.mon_len = 16'd64;
    for (int c = 0; c < CH; c++) cfg_baseline[c] = 16'd1000;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); ts_load = 1; @(negedge clk); ts_load = 0;
    wait (!dut.sp_busy);
    repeat (3000) @(negedge clk);
    chk(&link_locked, "links locked");
    for (int i = 0; i < EVENTS; i++) begin
      for (int c = 0; c < CH; c++) u_adc.pulse(c, amp(c));
      repeat (PERIOD) @(negedge clk);
    end
    t_end = longint'($time / 10);
    chk(reqs.size() == EVENTS && n_triggers == 32'(EVENTS), $sformatf("one request per pulse (%0d)", reqs.size()));
    chk(n_inhibited == 0, $sformatf("no trigger inhibited (%0d)", n_inhibited));
    chk(n_readout == 32'(EVENTS) && frames.size() == EVENTS, $sformatf("all events read out by %0d clocks after the last pulse (%0d frames)", PERIOD, frames.size()));
    for (int i = 0; i < frames.size() && i < reqs.size(); i++) begin
      words_t f;
      f = frames[i];
      chk(f.size() == 2 + ew + CH * 25 && f[0][63:56] == PKT_EVENT, $sformatf("event %0d frame size %0d", i, f.size()));
      if (f.size() != 2 + ew + CH * 25) continue;
      chk(f[1][63:16] == reqs[i].ts, $sformatf("event %0d timestamp", i));
      for (int c = 0; c < CH; c++) begin
        int e;
        e = int'(f[2 + c / 4][16 * (c % 4) +: 16]);
        chk(e > amp(c) * 98 / 100 && e < amp(c) * 102 / 100, $sformatf("event %0d ch%0d energy %0d of %0d", i, c, e, amp(c)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (EVENTS * PERIOD + 250000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
