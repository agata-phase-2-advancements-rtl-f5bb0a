// Testbench for tdm_deagg: interleaves random words of four links with a mark on link 0,
// checks every recovered group, then misplaces a mark and checks the error count, the
// lock and that the following groups are recovered again.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_tdm_deagg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_mark = 0;
  logic [15:0] in_data = 0;
  logic out_valid, locked;
  logic [3:0][15:0] out_data;
  logic [15:0] align_errors;
  int checks = 0, failures = 0, groups = 0;
  logic [3:0][15:0] exp_q [$];

  tdm_deagg #(.LANES(4), .W(16)) dut (.*);

  task automatic send(input logic [15:0] d, input logic m);
    @(negedge clk);
    in_valid = 1; in_data = d; in_mark = m;
    @(negedge clk);
    in_valid = 0; in_mark = 0;
  endtask
  task automatic group();
    logic [3:0][15:0] g;
    for (int l = 0; l < 4; l++) g[l] = 16'($urandom);
    exp_q.push_back(g);
    for (int l = 0; l < 4; l++) begin
      send(g[l], l == 0);
      if ($urandom_range(0, 3) == 0) @(negedge clk);   // gaps in the line
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || out_data != exp_q[0]) begin
      failures++; $display("FAIL group %0d got %h exp %h", groups, out_data, exp_q[0]);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
    groups++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    send(16'h1111, 0);               // word before lock: dropped
    repeat (50) group();
    repeat (3) @(posedge clk);
    checks++; if (groups != 50) begin failures++; $display("FAIL groups %0d", groups); end
    checks++; if (align_errors != 0 || !locked) failures++;
    // misplaced mark: two words then a new group
    send(16'hAAAA, 1); send(16'hBBBB, 0);
    repeat (10) group();
    repeat (3) @(posedge clk);
    checks++; if (align_errors != 1) begin failures++; $display("FAIL align %0d", align_errors); end
    checks++; if (groups != 60) begin failures++; $display("FAIL groups %0d", groups); end
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
