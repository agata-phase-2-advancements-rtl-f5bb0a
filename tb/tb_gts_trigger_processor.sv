// Testbench for gts_trigger_processor (16 leaves, 8 partitions, manual reference mode).
// Partition 0 holds leaves 0-3 with multiplicity threshold 2, partition 1 leaves 4-7 with
// threshold 3. With the equation "P0 or P1" two close requests from partition 0 must both be
// validated, and a further request inside partition 0's acceptance window must be validated
// at once as late. A lone request from partition 1 must be rejected after the time-out. With
// the equation "P0 and P1" the same two partition-0 requests must be rejected, and with
// partition 1 also reaching its threshold all five must be validated. Every answer is
// compared with the request it belongs to.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_gts_trigger_processor;
  import agata_pkg::*;
  localparam int NLEAF = 16, NPART = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_mode = 1, req_valid = 0, rep_ready = 1;
  ts_t cfg_delay = 48'd0;
  logic [7:0] cfg_nb_samples = 8'd1;
  logic [NLEAF-1:0] cfg_leaf_mask = '1;
  logic [NLEAF-1:0][NPART-1:0] cfg_assign;
  logic [NPART-1:0][15:0] cfg_mult_win, cfg_acc_width, cfg_coinc_delay, cfg_coinc_width;
  logic [NPART-1:0][8:0] cfg_threshold;
  logic [255:0] cfg_le_table;
  logic [31:0] cfg_timeout = 32'd60;
  gts_req_t req = '0;
  logic rep_valid, ts_valid, le_met;
  gts_reply_t rep;
  ts_t ts;
  logic [1:0] ts_state;
  logic [NPART-1:0] coinc;
  logic [31:0] n_accepted, n_rejected, n_late;
  int checks = 0, failures = 0;
  gts_reply_t got [$];

  gts_trigger_processor #(.NLEAF(NLEAF), .NPART(NPART), .DEPTH(16)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (rst_n && rep_valid && rep_ready) got.push_back(rep);
  task automatic send(input int leaf);
    req_valid = 1; req.leaf = 8'(leaf); req.ts = ts; @(negedge clk); req_valid = 0;
  endtask
  task automatic expect_replies(input int leaves [$], input logic acc, input string what);
    chk(got.size() == leaves.size(), $sformatf("%s: %0d replies", what, got.size()));
    for (int i = 0; i < leaves.size() && i < got.size(); i++)
      chk(got[i].leaf == 8'(leaves[i]) && got[i].accept == acc, $sformatf("%s: reply %0d", what, i));
    got.delete();
  endtask

  initial begin
    for (int l = 0; l < NLEAF; l++) cfg_assign[l] = (l < 4) ? 8'h01 : (l < 8) ? 8'h02 : 8'h00;
    for (int p = 0; p < NPART; p++) begin
      cfg_mult_win[p] = 16'd20; cfg_acc_width[p] = 16'd50;
      cfg_coinc_delay[p] = 16'd0; cfg_coinc_width[p] = 16'd10;
      cfg_threshold[p] = (p == 1) ? 9'd3 : 9'd2;
    end
    for (int k = 0; k < 256; k++) cfg_le_table[k] = k[0] | k[1];
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    chk(ts_valid && ts_state == 2'd2, "reference running");
    // P0 reaches its multiplicity
    send(1); repeat (3) @(negedge clk); send(2);
    repeat (10) @(negedge clk);
    expect_replies('{1, 2}, 1, "P0 validated");
    send(3); repeat (5) @(negedge clk);
    expect_replies('{3}, 1, "late request validated");
    chk(n_late == 1, "late counted");
    repeat (100) @(negedge clk);
    // lone P1 request times out
    send(5); repeat (40) @(negedge clk);
    chk(got.size() == 0, "waiting");
    repeat (40) @(negedge clk);
    expect_replies('{5}, 0, "P1 alone rejected");
    // AND equation
    for (int k = 0; k < 256; k++) cfg_le_table[k] = k[0] & k[1];
    send(0); send(3); repeat (90) @(negedge clk);
    expect_replies('{0, 3}, 0, "P0 alone rejected under AND");
    send(0); send(4); send(3); send(6); send(7);
    repeat (15) @(negedge clk);
    expect_replies('{0, 4, 3, 6, 7}, 1, "P0 and P1 validated");
    chk(n_accepted == 8 && n_rejected == 3, "counters");
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
