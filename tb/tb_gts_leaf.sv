// Testbench for gts_leaf: timestamp counting and loading, a trigger turned into a request
// carrying the timestamp, inhibition by backpressure, by a full event memory and by a
// request still waiting on the tree, and replies filtered by leaf number.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_gts_leaf;
  import agata_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic smp_en = 0, ts_load = 0, local_trig = 0, backpressure = 0, mem_full = 0;
  logic [7:0] leaf_id = 8'd17;
  ts_t ts_load_val = 48'h1000, ts, evt_ts, val_ts;
  logic evt_trig, req_valid, req_ready = 1, rep_valid = 0, val_valid, val_accept;
  gts_req_t req;
  gts_reply_t rep = '0;
  logic [31:0] n_requests, n_accepted, n_rejected, n_inhibited;
  int checks = 0, failures = 0, nevt = 0, nval = 0;

  gts_leaf dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(negedge clk) if (rst_n) begin
    if (evt_trig) nevt++;
    if (val_valid) nval++;
  end
  task automatic strobe(int k);
    repeat (k) begin @(negedge clk); smp_en = 1; @(negedge clk); smp_en = 0; end
  endtask
  task automatic fire();
    @(negedge clk); local_trig = 1; @(negedge clk); local_trig = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); ts_load = 1; @(negedge clk); ts_load = 0;
    chk(ts == 48'h1000, "load");
    strobe(7);
    chk(ts == 48'h1007, "count");
    fire();
    chk(req_valid && req.ts == 48'h1007 && req.leaf == 8'd17, "request");
    @(negedge clk);
    chk(nevt == 1 && evt_ts == 48'h1007, "event");
    chk(!req_valid, "request taken");
    backpressure = 1; fire(); backpressure = 0;
    mem_full = 1; fire(); mem_full = 0;
    req_ready = 0; fire(); @(negedge clk); fire();
    chk(nevt == 2 && n_inhibited == 3, "inhibit");
    chk(req_valid, "request held");
    req_ready = 1; @(negedge clk);
    chk(n_requests == 2, "requests");
    // replies: one for another leaf, then accept and reject for this one
    rep = '{leaf: 8'd3, ts: 48'h1007, accept: 1'b1}; rep_valid = 1; @(negedge clk); rep_valid = 0; @(negedge clk);
    chk(nval == 0, "foreign reply ignored");
    rep = '{leaf: 8'd17, ts: 48'h1007, accept: 1'b1}; rep_valid = 1; @(negedge clk); rep_valid = 0; @(negedge clk);
    chk(nval == 1 && val_accept && val_ts == 48'h1007, "accept");
    rep = '{leaf: 8'd17, ts: 48'h1009, accept: 1'b0}; rep_valid = 1; @(negedge clk); rep_valid = 0; @(negedge clk);
    chk(nval == 2 && !val_accept && n_accepted == 1 && n_rejected == 1, "reject");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
