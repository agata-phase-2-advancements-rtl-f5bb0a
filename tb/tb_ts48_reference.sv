// Testbench for ts48_reference (8 leaves, leaves 1, 2, 4, 5 and 7 in use, 4 samples each).
// Manual mode: after reset with cfg_mode set the reference must start at cfg_delay and count
// one per clock, state 2. Learning mode: the used leaves send requests whose timestamps run
// ahead of the testbench clock by a different offset each; leaf 0, not in use, sends very
// small timestamps that must be ignored. The state must read 1 until every used leaf has sent
// 4 requests, then, after the scan of the 8 leaves, 2 with the reference equal to the
// smallest of the last timestamps seen plus the 9 clocks the scan took, counting on from there.
module tb_ts48_reference;
  import agata_pkg::*;
  localparam int NLEAF = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_mode = 1, req_valid = 0;
  ts_t cfg_delay = 48'd5000;
  logic [7:0] cfg_nb_samples = 8'd4;
  logic [NLEAF-1:0] cfg_leaf_mask = 8'b1011_0110;
  gts_req_t req = '0;
  ts_t ts;
  logic ts_valid;
  logic [1:0] state_o;
  int checks = 0, failures = 0;
  longint clk_n = 0;
  longint off [NLEAF] = '{0, 700, 300, 0, 900, 450, 0, 1200};
  ts_t last [NLEAF];
  int cnt [NLEAF];

  ts48_reference #(.NLEAF(NLEAF)) dut (.*);

  always @(posedge clk) clk_n++;
  // first reference value after learning
  bit seen = 0;
  ts_t first_ts;
  always @(negedge clk) if (rst_n && !cfg_mode && ts_valid && !seen) begin seen = 1; first_ts = ts; end
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    ts_t t0, mn;
    bit learn_ok;
    repeat (3) @(posedge clk); rst_n = 1;
    // manual mode
    repeat (2) @(negedge clk);
    chk(ts_valid && state_o == 2'd2, "manual: processing");
    t0 = ts;
    chk(t0 >= cfg_delay && t0 <= cfg_delay + 2, "manual: starts at the delay");
    repeat (100) @(negedge clk);
    chk(ts == t0 + 100, "manual: counts per clock");
    // learning mode
    cfg_mode = 0; rst_n = 0; @(negedge clk); rst_n = 1;
    @(negedge clk);
    learn_ok = 1;
    while (state_o != 2'd2) begin
      int l;
      if (state_o != 2'd1) learn_ok = 0;
      if (clk_n > 5000) break;
      l = $urandom_range(0, NLEAF - 1);
      if (l == 0 || cfg_leaf_mask[l]) begin
        req_valid = 1; req.leaf = 8'(l);
        req.ts = (l == 0) ? 48'd7 : ts_t'(clk_n + off[l]);
        if (cfg_leaf_mask[l] && ts_valid == 0 && dut.state == 1) begin last[l] = req.ts; cnt[l]++; end
      end
      @(negedge clk); req_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    chk(learn_ok, "learning state until done");
    mn = '1;
    for (int l = 0; l < NLEAF; l++) if (cfg_leaf_mask[l]) begin
      chk(cnt[l] >= 4, "each leaf sampled");
      if (last[l] < mn) mn = last[l];
    end
    chk(first_ts == mn + NLEAF + 1, $sformatf("learned reference %0d expected %0d", first_ts, mn + NLEAF + 1));
    t0 = ts;
    repeat (50) @(negedge clk);
    chk(ts == t0 + 50, "counts on");
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
