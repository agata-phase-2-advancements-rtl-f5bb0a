// Testbench for tp_partition. The reference time counts one per clock. Requests from member
// leaves, timestamped with the time at which they are sent, open a multiplicity window of
// cfg_mult_win; the testbench counts them itself, and requests from non-members are sent too
// and must not count. When the count reaches cfg_threshold the partition must open its
// acceptance window for cfg_acc_width ticks and its coincidence window cfg_coinc_delay ticks
// later for cfg_coinc_width ticks; both are checked every clock against the time at which the
// threshold was reached. Requests spread wider than the window must never reach the threshold.
module tb_tp_partition;
  import agata_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ts_t now_ts = 48'd1000, req_ts = '0;
  logic req_valid = 0, member = 0;
  logic [15:0] cfg_mult_win = 16'd20, cfg_acc_width = 16'd40, cfg_coinc_delay = 16'd10, cfg_coinc_width = 16'd15;
  logic [8:0] cfg_threshold = 9'd3;
  logic [8:0] multiplicity;
  logic acc, coinc;
  logic [31:0] n_met;
  int checks = 0, failures = 0, mets = 0;
  ts_t t_met = '0;
  bit have_met = 0;

  tp_partition dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  int last_nmet = 0;
  always @(negedge clk) if (rst_n) begin
    if (int'(n_met) != last_nmet) begin last_nmet = int'(n_met); t_met = now_ts; have_met = 1; end
    if (have_met) begin
      chk(acc == (now_ts < t_met + cfg_acc_width), $sformatf("acc at %0d (met %0d)", now_ts, t_met));
      chk(coinc == (now_ts >= t_met + cfg_coinc_delay && now_ts < t_met + cfg_coinc_delay + cfg_coinc_width),
          $sformatf("coinc at %0d", now_ts));
    end
    now_ts++;
  end
  task automatic send(input logic m);
    req_valid = 1; member = m; req_ts = now_ts; @(negedge clk); req_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // three members inside the window, with a non-member between
    send(1); repeat (5) @(negedge clk); send(0); send(1); repeat (4) @(negedge clk);
    chk(multiplicity == 2 && n_met == 0, "two counted, non-member ignored");
    send(1); repeat (3) @(negedge clk);
    chk(n_met == 1, "threshold reached");
    repeat (100) @(negedge clk);
    // spread wider than the window: never three in one window
    for (int i = 0; i < 6; i++) begin send(1); repeat (11) @(negedge clk); end
    chk(n_met == 1, "spread requests do not trigger");
    repeat (30) @(negedge clk);
    // threshold 1: every member request starts a window when none is open
    cfg_threshold = 9'd1;
    send(1); repeat (3) @(negedge clk);
    chk(n_met == 2, "threshold one");
    repeat (80) @(negedge clk);
    chk(checks > 300, "windows checked");
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
