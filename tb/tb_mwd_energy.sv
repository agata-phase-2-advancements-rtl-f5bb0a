// Testbench for mwd_energy. Feeds exponentially decaying pulses (tau = 500 samples) on a
// baseline and compares, sample by sample, the trapezoid with a direct evaluation of the
// MWD and moving-sum formulas over the stored input history; then checks that the captured
// energy equals the model's trapezoid cfg_peak samples after the capture request, and that
// the deconvolution makes it match the height of the step within 1 %.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_mwd_energy;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int M = 200, L = 64, PEAK = 150;
  logic smp_en = 0;
  logic [15:0] x = 16'd2000, cfg_baseline = 16'd2000;
  logic [10:0] cfg_m = 11'(M), cfg_l = 11'(L), cfg_peak = 11'(PEAK);
  logic [23:0] cfg_k;
  logic [5:0]  cfg_shift = 6'd6;
  logic trig = 0;
  logic signed [47:0] trap;
  logic e_valid;
  logic [15:0] energy;
  int checks = 0, failures = 0, n = 0;
  longint b [$], mw [$];
  longint tmodel [$];
  int ecount = 0;
  int unsigned elast;

  mwd_energy #(.W(16), .MAX_M(2000), .MAX_L(2000), .E_W(16)) dut (.*);
  initial cfg_k = 24'((64'd1 << 24) / 500);

  function automatic longint bget(int i); return (i < 0) ? 0 : b[i]; endfunction
  function automatic longint mget(int i); return (i < 0) ? 0 : mw[i]; endfunction

  task automatic sample(input int v);
    longint s, m, t;
    @(negedge clk); x = 16'(v); smp_en = 1;
    b.push_back(longint'(v) - 2000);
    s = 0;
    for (int k = n - M; k < n; k++) s += bget(k);
    m = bget(n) - bget(n - M) + ((s * longint'(cfg_k)) >>> 24);
    mw.push_back(m);
    t = 0;
    for (int k = n - L + 1; k <= n; k++) t += mget(k);
    tmodel.push_back(t);
    @(negedge clk); smp_en = 0;
    checks++;
    if (trap != t) begin
      failures++;
      if (failures < 5) $display("FAIL n=%0d trap=%0d model=%0d", n, trap, t);
    end
    n++;
    @(negedge clk); @(negedge clk);
  endtask

  always @(negedge clk) if (rst_n && e_valid) begin ecount++; elast = energy; end

  task automatic pulse(input int amp, input int len, input real step);
    int n0;
    for (int i = 0; i < len; i++) begin
      sample(2000 + int'($rtoi(real'(amp) * $exp(-real'(i) / 500.0))));
      if (i == 5) begin
        n0 = n - 1;
        @(negedge clk); trig = 1; @(negedge clk); trig = 0;
      end
    end
    checks++;
    if (ecount == 0 || longint'(elast) != (tmodel[n0 + PEAK] >>> 6)) begin
      failures++; $display("FAIL energy %0d model %0d", elast, tmodel[n0 + PEAK] >>> 6);
    end
    checks++;
    if (real'(elast) < 0.99 * step || real'(elast) > 1.01 * step) begin
      failures++; $display("FAIL amplitude %0d vs %f", elast, step);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (300) sample(2000);
    pulse(5000, 600, 5000.0);
    // the second pulse sits on the tail of the first: the filter measures the step height
    pulse(12000, 600, 12000.0 - 5000.0 * $exp(-600.0 / 500.0));
    checks++; if (ecount != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
