// Testbench for event_memory (6 channels). Samples carry their channel and sample number,
// so every trace word can be predicted. It checks: a validated event read out word by word
// (header, energies, traces starting cfg_pre samples early) under random backpressure; a
// rejected event freed without readout; an unanswered event freed by the time-out; mem_full
// once all eight slots wait for an answer; and a 200-sample event in long mode.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_event_memory;
  import agata_pkg::*;
  localparam int CH = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic smp_en = 0, cfg_long = 0, evt_trig = 0, val_valid = 0, val_accept = 0, out_ready = 0;
  logic [CH-1:0][15:0] samples;
  ts_t now_ts = '0, evt_ts = '0, val_ts = '0;
  logic [5:0] cfg_pre = 6'd10;
  logic [31:0] cfg_timeout = 32'd400;
  logic [7:0] evt_fine = 8'd99;
  logic [CH-1:0] e_valid = '0;
  logic [CH-1:0][15:0] energy = '0;
  logic mem_full, out_valid, out_last;
  logic [63:0] out_data;
  logic [31:0] n_events, n_readout, n_rejected, n_timeouts;
  int checks = 0, failures = 0, n = 0;
  logic [63:0] got [$];

  event_memory #(.CH(CH), .SLOTS(8), .SAMPLES(100), .LONG_SAMPLES(200), .MAX_PRE(64)) dut (.*);

  always_comb for (int c = 0; c < CH; c++) samples[c] = 16'((c << 12) | (n & 12'hFFF));
  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid && out_ready) got.push_back(out_data);
  end
  // a free-running sample strobe every 4 clocks
  initial forever begin
    repeat (3) @(negedge clk);
    smp_en = 1; @(negedge clk); smp_en = 0; n++; now_ts++;
  end
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  // trigger right after a strobe; returns the first captured sample number
  task automatic trigger(output int first, output ts_t t);
    @(posedge smp_en); @(negedge clk);
    evt_trig = 1; evt_ts = now_ts; t = now_ts; @(negedge clk); evt_trig = 0;
    first = n - 10;       // the next strobe carries sample n; capture starts cfg_pre earlier
  endtask
  task automatic energies(input int base);
    @(negedge clk);
    for (int c = 0; c < CH; c++) energy[c] = 16'(base + c);
    e_valid = '1; @(negedge clk); e_valid = '0;
  endtask
  task automatic reply(input ts_t t, input logic acc);
    @(negedge clk); val_valid = 1; val_ts = t; val_accept = acc; @(negedge clk); val_valid = 0;
  endtask
  task automatic check_event(input int first, input ts_t t, input int ns, input int ebase);
    int idx;
    wait (got.size() == 1 + (CH + 3) / 4 + CH * ns / 4);
    chk(got[0] == {t, 8'd99, 8'(ns)}, "header");
    for (int c = 0; c < CH; c++)
      chk(got[1 + c / 4][16 * (c % 4) +: 16] == 16'(ebase + c), "energy");
    idx = 1 + (CH + 3) / 4;
    for (int c = 0; c < CH; c++)
      for (int w = 0; w < ns / 4; w++) begin
        logic [63:0] e;
        for (int k = 0; k < 4; k++) e[16 * k +: 16] = 16'((c << 12) | ((first + 4 * w + k) & 12'hFFF));
        checks++;
        if (got[idx] != e) begin
          failures++;
          if (failures < 6) $display("FAIL trace c%0d w%0d got %h exp %h", c, w, got[idx], e);
        end
        idx++;
      end
    got.delete();
  endtask

  initial begin
    int first;
    ts_t t;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (400) @(negedge clk);
    // 1: validated event
    trigger(first, t);
    repeat (50) @(negedge clk); energies(500);
    reply(t, 1);
    check_event(first, t, 100, 500);
    repeat (20) @(negedge clk);
    chk(n_readout == 1 && out_valid == 0, "one readout");
    // 2: rejected
    trigger(first, t); energies(600); repeat (500) @(negedge clk);
    reply(t, 0); repeat (5) @(negedge clk);
    chk(n_rejected == 1 && got.size() == 0, "reject");
    // 3: time-out
    trigger(first, t); energies(700);
    repeat (2000) @(negedge clk);
    chk(n_timeouts == 1 && got.size() == 0, "timeout");
    // 4: fill every slot
    cfg_timeout = 32'd100000;
    for (int i = 0; i < 8; i++) begin
      trigger(first, t); energies(800); repeat (450) @(negedge clk);
    end
    chk(mem_full, "full");
    chk(n_events == 11, "events");
    // validate the first of them -> readout, one slot free again
    reply(t - 0, 1);
    wait (got.size() == 1 + 2 + CH * 25); repeat (10) @(negedge clk);
    chk(!mem_full, "slot freed");
    got.delete();
    // 5: long traces
    cfg_long = 1;
    trigger(first, t);
    repeat (900) @(negedge clk); energies(900);
    reply(t, 1);
    check_event(first, t, 200, 900);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
