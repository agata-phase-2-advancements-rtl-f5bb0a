// Full-size test of gts_trigger_processor: 256 leaves in 8 partitions of 32 leaves each
// (leaf l in partition l / 32), FIFO depth 64, automatic (learning) reference mode.
// First every one of the 256 leaves sends two requests stamped with a global time; the
// reference must learn and then run within the span of those stamps. Then, with a
// multiplicity threshold of 4 in every partition and the equation "at least two partitions
// in coincidence":
//   - 4 leaves of partition 2 and 4 of partition 5 fire together: all 8 validated;
//   - 4 leaves of partition 3 alone: all rejected after the time-out;
//   - 3 leaves of partition 0 (below threshold) and 4 of partition 7: all rejected;
//   - 5 leaves of every partition (40 requests): all validated.
// Replies are compared, as sets, with the requests of each burst.
// Timing: a clock period of 10 time units stands for the 10 ns of 100 MHz; a watchdog ends
// the run with a failure counted if the test has not finished after a fixed number of cycles.
module tb_tp_array;
  import agata_pkg::*;
  localparam int NLEAF = 256, NPART = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_mode = 0, req_valid = 0, rep_ready = 1;
  ts_t cfg_delay = 48'd0;
  logic [7:0] cfg_nb_samples = 8'd2;
  logic [NLEAF-1:0] cfg_leaf_mask = '1;
  logic [NLEAF-1:0][NPART-1:0] cfg_assign;
  logic [NPART-1:0][15:0] cfg_mult_win, cfg_acc_width, cfg_coinc_delay, cfg_coinc_width;
  logic [NPART-1:0][8:0] cfg_threshold;
  logic [255:0] cfg_le_table;
  logic [31:0] cfg_timeout = 32'd80;
  gts_req_t req = '0;
  logic rep_valid, ts_valid, le_met;
  gts_reply_t rep;
  ts_t ts, gt;
  logic [1:0] ts_state;
  logic [NPART-1:0] coinc;
  logic [31:0] n_accepted, n_rejected, n_late;
  int checks = 0, failures = 0;
  gts_reply_t got [$];

  gts_trigger_processor dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) begin
    gt <= rst_n ? gt + 1'b1 : 48'd7_000_000;
    if (rst_n && rep_valid && rep_ready) got.push_back(rep);
  end
  task automatic send(input int leaf, input ts_t t);
    req_valid = 1; req.leaf = 8'(leaf); req.ts = t; @(negedge clk); req_valid = 0;
  endtask
  task automatic burst(input int leaves [$], input logic acc, input string what);
    int seen [int];
    foreach (leaves[i]) send(leaves[i], ts);
    repeat (int'(cfg_timeout) + 40) @(negedge clk);
    chk(got.size() == leaves.size(), $sformatf("%s: %0d replies of %0d", what, got.size(), leaves.size()));
    foreach (got[i]) begin
      seen[int'(got[i].leaf)] = 1;
      chk(got[i].accept == acc, $sformatf("%s: leaf %0d answer", what, got[i].leaf));
    end
    foreach (leaves[i]) chk(seen.exists(leaves[i]), $sformatf("%s: leaf %0d answered", what, leaves[i]));
    got.delete();
    repeat (100) @(negedge clk);
  endtask

  initial begin
    int q [$];
    ts_t first_stamp;
    for (int l = 0; l < NLEAF; l++) cfg_assign[l] = 8'(1 << (l / 32));
    for (int p = 0; p < NPART; p++) begin
      cfg_mult_win[p] = 16'd20; cfg_acc_width[p] = 16'd40;
      cfg_coinc_delay[p] = 16'd0; cfg_coinc_width[p] = 16'd30; cfg_threshold[p] = 9'd4;
    end
    for (int k = 0; k < 256; k++) cfg_le_table[k] = ($countones(k[7:0]) >= 2);
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    // learning: two requests from every leaf
    first_stamp = gt;
    for (int r = 0; r < 2; r++)
      for (int l = 0; l < NLEAF; l++) send(l, gt);
    repeat (NLEAF + 20) @(negedge clk);
    chk(ts_valid && ts_state == 2'd2, "reference learned and running");
    chk(ts > first_stamp && ts <= gt, $sformatf("learned time %0d within the stamps %0d..%0d", ts, first_stamp, gt));
    got.delete();
    repeat (200) @(negedge clk);
    q = {64, 65, 66, 67, 160, 161, 162, 163};
    burst(q, 1, "partitions 2 and 5");
    q = {96, 100, 104, 108};
    burst(q, 0, "partition 3 alone");
    q = {1, 2, 3, 224, 225, 226, 227};
    burst(q, 0, "partition 0 below threshold");
    q = {};
    for (int p = 0; p < NPART; p++) for (int i = 0; i < 5; i++) q.push_back(32 * p + 3 * i);
    burst(q, 1, "all partitions");
    $display("accepted %0d rejected %0d late %0d", n_accepted, n_rejected, n_late);
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
