// Testbench for rudp_core (window of 4 packets, time-out 50 clocks). It admits packets 0-3,
// checks that packet 4 is held back while packet 0 still occupies its slot, starts the
// timers, acknowledges 1 and 2 (and an acknowledge with a stale number, which must do
// nothing), then checks that 0 and 3 time out after exactly 50 clocks and are asked for again
// one by one, lowest slot first, with rtx_valid held until taken. Acknowledging the resent
// packets frees the window and admits packet 4. With cfg_enable clear every packet is admitted.
module tb_rudp_core;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_enable = 1, admit = 0, tx_start = 0, ack_valid = 0, rtx_ready = 0;
  logic [31:0] cfg_timeout = 32'd50, admit_seq = '0, tx_seq = '0, ack_seq = '0;
  logic admit_ok, rtx_valid;
  logic [31:0] rtx_seq, n_acked, n_timeouts;
  logic [W-1:0] active;
  int checks = 0, failures = 0;

  rudp_core #(.WINDOW(W)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic do_admit(input int s);
    @(negedge clk); admit_seq = 32'(s); #1 chk(admit_ok, $sformatf("admit %0d", s));
    admit = 1; @(negedge clk); admit = 0;
  endtask
  task automatic start(input int s);
    @(negedge clk); tx_start = 1; tx_seq = 32'(s); @(negedge clk); tx_start = 0;
  endtask
  task automatic ack(input int s);
    @(negedge clk); ack_valid = 1; ack_seq = 32'(s); @(negedge clk); ack_valid = 0;
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) do_admit(s);
    @(negedge clk); admit_seq = 32'd4; #1 chk(!admit_ok, "window full");
    chk(active == 4'b1111, "all slots busy");
    t0 = $time / 10;
    for (int s = 0; s < 4; s++) start(s);
    ack(1); ack(2); ack(6);          // 6 shares slot 2 but is not its packet
    repeat (2) @(negedge clk);
    chk(active == 4'b1001 && n_acked == 2, "acks free slots");
    // time-out of packet 0
    wait (rtx_valid); t1 = $time / 10;
    chk(rtx_seq == 0, "packet 0 asked for first");
    chk(t1 - t0 >= 50 && t1 - t0 <= 54, $sformatf("time-out after %0d clocks", t1 - t0));
    repeat (10) @(negedge clk);
    chk(rtx_valid && rtx_seq == 0, "request held until taken");
    @(negedge clk); rtx_ready = 1; @(negedge clk); rtx_ready = 0;
    @(negedge clk);
    chk(rtx_valid && rtx_seq == 3, "then packet 3");
    @(negedge clk); rtx_ready = 1; @(negedge clk); rtx_ready = 0;
    repeat (2) @(negedge clk);
    chk(!rtx_valid && n_timeouts == 2, "two time-outs");
    start(0); start(3); ack(0); ack(3);
    repeat (2) @(negedge clk);
    chk(active == 4'b0000 && n_acked == 4, "window empty");
    @(negedge clk); admit_seq = 32'd4; #1 chk(admit_ok, "packet 4 admitted");
    repeat (100) @(negedge clk);
    chk(!rtx_valid && n_timeouts == 2, "nothing more resent");
    cfg_enable = 0;
    do_admit(8); do_admit(12);
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
