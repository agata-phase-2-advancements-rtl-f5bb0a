// Testbench for datapath: a step of 3000 on a 1000 baseline (no decay, K = 0) must give one
// CFD trigger three samples after the step with fine time 64 (fraction 1/4, delay 3), and
// an energy request issued on that trigger must return the flat top of the trapezoid,
// L * 3000 >> 5 = 3000 for L = 32, cfg_peak samples later.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_datapath;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic smp_en = 0;
  logic [15:0] x = 16'd1000;
  logic cfg_le_mode = 0;
  logic [15:0] cfg_threshold = 16'd300, cfg_baseline = 16'd1000;
  logic [4:0] cfg_delay = 5'd2, cfg_diff = 5'd15;
  logic [7:0] cfg_frac = 8'd64;
  logic [10:0] cfg_m = 11'd100, cfg_l = 11'd32, cfg_peak = 11'd40;
  logic [23:0] cfg_k = '0;
  logic [5:0] cfg_shift = 6'd5;
  logic evt_trig = 0;
  logic trig, e_valid;
  logic [7:0] fine;
  logic signed [17:0] cfd_out;
  logic signed [47:0] trap;
  logic [15:0] energy;
  int checks = 0, failures = 0, n = 0, ntrig = 0, trig_n = -1, ne = 0, e_n = -1;
  int unsigned fine_seen, e_seen;

  datapath dut (.*);

  always @(negedge clk) if (rst_n) begin
    if (trig) begin ntrig++; trig_n = n - 1; fine_seen = fine; end
    if (e_valid) begin ne++; e_seen = energy; e_n = n - 1; end
  end
  // the event trigger follows the local trigger, as the leaf does
  always @(posedge clk) evt_trig <= rst_n && trig;

  task automatic sample(input int v);
    @(negedge clk); x = 16'(v); smp_en = 1;
    @(negedge clk); smp_en = 0;
    n++;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int s;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (150) sample(1000);
    checks++; if (ntrig != 0 || ne != 0) begin failures++; $display("FAIL output while the history fills"); end
    s = n;
    repeat (200) sample(4000);
    checks++; if (ntrig != 1 || trig_n != s + 3 || fine_seen != 64) begin
      failures++; $display("FAIL trig %0d at %0d fine %0d", ntrig, trig_n, fine_seen); end
    checks++; if (ne != 1 || e_seen != 3000) begin
      failures++; $display("FAIL energy %0d n=%0d", e_seen, ne); end
    checks++; if (e_n != s + 3 + 41) begin
      failures++; $display("FAIL energy sample %0d exp %0d", e_n, s + 44); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
