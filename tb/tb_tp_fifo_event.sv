// Testbench for tp_fifo_event (4 entries, time-out 30 ticks). It checks that queued requests
// wait without an answer until the logic equation is met and are then all validated in
// order; that requests nobody validates are all rejected once the oldest has waited the
// time-out; that a request flagged late (arriving inside an acceptance window that has already
// validated) is validated at once; that requests beyond the depth are dropped and counted;
// and that the answers carry the request's leaf and timestamp, under random rep_ready.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_tp_fifo_event;
  import agata_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ts_t now_ts = 48'd100;
  logic [31:0] cfg_timeout = 32'd30;
  logic req_valid = 0, req_late = 0, le_met = 0, rep_ready = 0;
  gts_req_t req = '0;
  logic rep_valid;
  gts_reply_t rep;
  logic [31:0] n_accepted, n_rejected, n_dropped;
  int checks = 0, failures = 0;
  gts_reply_t got [$];

  tp_fifo_event #(.DEPTH(4)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (rst_n && rep_valid && rep_ready) got.push_back(rep);
  always @(negedge clk) begin now_ts++; rep_ready = ($urandom_range(0, 2) != 0); end
  task automatic push(input int leaf, input logic late);
    req_valid = 1; req.leaf = 8'(leaf); req.ts = ts_t'(leaf * 1000); req_late = late;
    @(negedge clk); req_valid = 0; req_late = 0;
  endtask
  task automatic expect_replies(input int first_leaf, input int n, input logic acc, input string what);
    chk(got.size() == n, $sformatf("%s: %0d replies", what, got.size()));
    for (int i = 0; i < n && i < got.size(); i++)
      chk(got[i].leaf == 8'(first_leaf + i) && got[i].ts == ts_t'((first_leaf + i) * 1000)
          && got[i].accept == acc, $sformatf("%s: reply %0d", what, i));
    got.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // validation by the logic equation
    push(1, 0); push(2, 0); push(3, 0);
    repeat (20) @(negedge clk);
    chk(got.size() == 0, "held until decided");
    le_met = 1; @(negedge clk); le_met = 0;
    repeat (20) @(negedge clk);
    expect_replies(1, 3, 1, "validated");
    // rejection by time-out
    push(4, 0); repeat (5) @(negedge clk); push(5, 0);
    repeat (20) @(negedge clk);
    chk(got.size() == 0, "not yet timed out");
    repeat (20) @(negedge clk);
    expect_replies(4, 2, 0, "timed out");
    // late request
    push(6, 1); repeat (8) @(negedge clk);
    expect_replies(6, 1, 1, "late");
    // overflow
    rep_ready = 0;
    for (int i = 0; i < 6; i++) push(10 + i, 0);
    chk(n_dropped == 2, "two dropped");
    le_met = 1; @(negedge clk); le_met = 0;
    repeat (30) @(negedge clk);
    expect_replies(10, 4, 1, "after overflow");
    chk(n_accepted == 8 && n_rejected == 2, "counters");
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
