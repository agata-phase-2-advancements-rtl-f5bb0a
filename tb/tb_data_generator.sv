// Testbench for data_generator. With enable set it must send packets of cfg_words words
// whose words count up without a gap across packets, out_last on every cfg_words-th word;
// changing cfg_words takes effect at a packet boundary in this test; after enable drops the
// packet under way is finished and nothing more is sent. n_packets is compared with the
// count of out_last words seen.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_data_generator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 0, out_ready = 0;
  logic [15:0] cfg_words = 16'd7;
  logic out_valid, out_last;
  logic [63:0] out_data;
  logic [31:0] n_packets;
  int checks = 0, failures = 0, nw = 0, inpkt = 0, pk = 0, cur_words = 7;

  data_generator dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    chk(out_data == 64'(nw), "counter data");
    chk(out_last == (inpkt == cur_words - 1), "out_last");
    nw++; inpkt++;
    if (out_last) begin inpkt = 0; pk++; cur_words = cfg_words; end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    chk(nw == 0, "quiet while disabled");
    enable = 1;
    repeat (1000) @(negedge clk);
    // change the size at a packet boundary
    wait (inpkt == 0); cfg_words = 16'd3; cur_words = 3;
    repeat (500) @(negedge clk);
    enable = 0;
    repeat (50) @(negedge clk);
    chk(inpkt == 0 && pk > 100, "ends on a packet boundary");
    chk(n_packets == 32'(pk), "packet counter");
    begin
      int nw_then;
      nw_then = nw;
      repeat (50) @(negedge clk);
      chk(nw == nw_then, "stopped");
    end
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
