// Testbench for dcfd. Drives steps and ramps at one sample per four clocks and checks the
// trigger sample and the interpolated fine time worked out by hand:
//  - CFD, ideal step A, delay D = 3, fraction 1/4, difference span 16: c goes from -A/4 to
//    3A/4 at sample s+3, so the trigger follows sample s+3 with fine = 64;
//  - CFD, small step below the threshold: no trigger;
//  - LE, ramp of 1000 per sample, threshold 2500: crossing between d = 2000 and 3000, i.e.
//    after sample s+2 with fine = 128.
module tb_dcfd;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic smp_en = 0;
  logic [15:0] x = 16'd1000;
  logic cfg_le_mode = 0;
  logic [15:0] cfg_threshold = 16'd300;
  logic [4:0] cfg_delay = 5'd2, cfg_diff = 5'd15;
  logic [7:0] cfg_frac = 8'd64;
  logic trig;
  logic [7:0] fine;
  logic signed [17:0] cfd_out;
  int checks = 0, failures = 0, n = 0, ntrig = 0, trig_n = -1;
  int unsigned fine_seen;

  dcfd #(.W(16), .MAX_D(16), .MAX_DF(16)) dut (.*);

  always @(negedge clk) if (rst_n && trig) begin ntrig++; trig_n = n - 1; fine_seen = fine; end

  task automatic sample(input int v);
    @(negedge clk); x = 16'(v); smp_en = 1;
    @(negedge clk); smp_en = 0;
    n++;
    repeat (2) @(negedge clk);
  endtask
  task automatic expect_trig(input int cnt, input int at, input int f, input string what);
    checks++;
    if (ntrig != cnt || (cnt > 0 && (trig_n != at || fine_seen != f))) begin
      failures++;
      $display("FAIL %s: ntrig=%0d at=%0d (exp %0d) fine=%0d (exp %0d)", what, ntrig, trig_n, at, fine_seen, f);
    end
  endtask

  initial begin
    int s;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (40) sample(1000);
    checks++; if (ntrig != 0) begin failures++; $display("FAIL trigger while the history fills"); end
    // CFD on an ideal step of 2000
    s = n; repeat (60) sample(3000);
    expect_trig(1, s + 3, 64, "cfd step");
    repeat (60) sample(1000);
    expect_trig(1, s + 3, 64, "cfd no retrigger");
    // below threshold
    repeat (40) sample(1200);
    repeat (40) sample(1000);
    expect_trig(1, s + 3, 64, "below threshold");
    // leading edge on a ramp
    cfg_le_mode = 1; cfg_threshold = 16'd2500;
    repeat (20) sample(1000);
    s = n;
    sample(2000); sample(3000); sample(4000); sample(5000);
    repeat (40) sample(5000);
    expect_trig(2, s + 2, 128, "le ramp");
    // CFD on a ramp with a fraction of 1/2: check against a direct computation
    cfg_le_mode = 0; cfg_threshold = 16'd300; cfg_frac = 8'd128; cfg_delay = 5'd1;
    repeat (40) sample(1000);
    s = n;
    sample(1700); sample(2400); sample(3100); sample(3800);
    repeat (40) sample(3800);
    // d = 700,1400,2100,2800 (then flat); D = 2: c = d[n-2] - d[n]/2:
    // n=s:-350 s+1:-700 s+2:700-1050=-350 s+3:1400-1400=0 -> crossing at s+3, fine = 256*350/350 -> 255 clamp
    expect_trig(3, s + 3, 255, "cfd ramp");
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
