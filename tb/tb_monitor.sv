// Testbench for monitor (64-sample memory, 16-sample packets). A counting sample stream is
// captured after arm; the capture is then sent as packets, each with a header
// {0, packet number, packet count, samples in packet} and out_last on its last word. It
// checks two captures (40 samples = 16+16+8, and 64 samples = 4 full packets) under random
// backpressure, and that arm with a length above the memory is ignored.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_monitor;
  localparam int DEPTH = 64, PKT = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic arm = 0, in_valid = 0, out_ready = 0;
  logic [15:0] cfg_len = '0, in_data = '0;
  logic busy, out_valid, out_last;
  logic [63:0] out_data;
  int checks = 0, failures = 0, n = 0;
  logic [63:0] got [$];
  logic lastflag [$];

  monitor #(.DEPTH(DEPTH), .PKT_SAMPLES(PKT)) dut (.*);

  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 2) != 0);
    if (rst_n && out_valid && out_ready) begin got.push_back(out_data); lastflag.push_back(out_last); end
  end
  initial forever begin
    @(negedge clk); in_valid = 1; in_data = 16'(n); n++;
    @(negedge clk); in_valid = 0;
  end
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic run(input int len);
    int first, idx, npkt, s;
    int armed_at;
    @(negedge clk);
    arm = 1; cfg_len = 16'(len); armed_at = n; @(negedge clk); arm = 0;
    wait (!busy); repeat (3) @(negedge clk);
    // the capture starts with the first sample offered after arm
    first = int'(got[1][15:0]);
    chk(first >= armed_at - 1 && first <= armed_at + 1, "capture starts at arm");
    npkt = (len + PKT - 1) / PKT;
    idx = 0; s = 0;
    for (int p = 0; p < npkt; p++) begin
      int ns;
      ns = (len - p * PKT > PKT) ? PKT : len - p * PKT;
      chk(got[idx] == {16'h0, 16'(p), 16'(npkt), 16'(ns)}, $sformatf("header %0d got %h", p, got[idx]));
      chk(!lastflag[idx], "header not last");
      idx++;
      for (int w = 0; w < ns / 4; w++) begin
        logic [63:0] e;
        for (int k = 0; k < 4; k++) e[16 * k +: 16] = 16'(first + s + k);
        s += 4;
        chk(got[idx] == e, $sformatf("data p%0d w%0d got %h exp %h", p, w, got[idx], e));
        chk(lastflag[idx] == (w == ns / 4 - 1), "last");
        idx++;
      end
    end
    chk(got.size() == idx, "word count");
    got.delete(); lastflag.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    run(40);
    run(64);
    arm = 1; cfg_len = 16'(DEPTH + 4); @(negedge clk); arm = 0;
    repeat (5) @(negedge clk);
    chk(!busy, "oversize arm ignored");
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
