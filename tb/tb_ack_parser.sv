// Testbench for ack_parser. Frames of six header words (random contents) and a payload are
// sent on the receive stream: acknowledge frames with the tag 0x41434B00 and a sequence
// number, and other frames. It checks that each acknowledge gives exactly one ack_valid pulse
// with its number, that the header words are never taken for a payload even when they hold
// the tag, and that other payload words are counted in n_ignored.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_ack_parser;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_last = 0;
  logic [63:0] in_data = '0;
  logic ack_valid;
  logic [31:0] ack_seq, n_ignored;
  int checks = 0, failures = 0;
  int exp_q [$];
  int n_acks = 0, n_other = 0;

  ack_parser dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(negedge clk) if (rst_n && ack_valid) begin
    chk(exp_q.size() > 0 && ack_seq == 32'(exp_q[0]), $sformatf("ack %0d", ack_seq));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
    n_acks++;
  end
  task automatic frame(input bit is_ack, input int seq);
    if (is_ack) exp_q.push_back(seq); else n_other++;
    for (int w = 0; w < 7; w++) begin
      in_valid = 1;
      in_data  = (w < 6) ? ((w == 2) ? {32'h41434B00, 32'hDEAD} : {$urandom, $urandom})
                         : (is_ack ? {32'h41434B00, 32'(seq)} : {32'h12345678, 32'(seq)});
      in_last  = (w == 6);
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0; in_last = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 100; i++) frame($urandom_range(0, 3) != 0, i * 7 + 3);
    repeat (5) @(negedge clk);
    chk(exp_q.size() == 0 && n_acks + n_other == 100, "every acknowledge seen once");
    chk(n_ignored == 32'(n_other), "ignored payloads");
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
