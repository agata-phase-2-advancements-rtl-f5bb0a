// Testbench for frame_store (4 slots of 8 words). Packets with sequence numbers 0..11 and
// lengths 1..8 are written; since a slot holds the packet whose number ends in its index,
// each write replaces the packet four numbers earlier. Read requests for packets still held
// must return every word, out_len, out_seq and out_last, under random backpressure, and a
// request is only taken while no read is running.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_frame_store;
  localparam int WINDOW = 4, PW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_valid = 0, wr_last = 0, rd_req = 0, out_ready = 0;
  logic [63:0] wr_data = '0;
  logic [15:0] wr_len = '0;
  logic [31:0] wr_seq = '0, rd_seq = '0;
  logic rd_req_ready, out_valid, out_last;
  logic [63:0] out_data;
  logic [15:0] out_len;
  logic [31:0] out_seq;
  int checks = 0, failures = 0;
  logic [63:0] got [$];
  logic lastq [$];

  frame_store #(.WINDOW(WINDOW), .PKT_WORDS(PW)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic int plen(input int seq); return 1 + (seq * 5) % PW; endfunction
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got.push_back(out_data); lastq.push_back(out_last);
    chk(out_len == 16'(plen(int'(out_seq))), "out_len");
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  task automatic write(input int seq);
    for (int w = 0; w < plen(seq); w++) begin
      @(negedge clk); wr_valid = 1; wr_data = {32'(seq), 32'(w)}; wr_last = (w == plen(seq) - 1);
      wr_len = 16'(plen(seq)); wr_seq = 32'(seq);
    end
    @(negedge clk); wr_valid = 0; wr_last = 0;
  endtask
  task automatic read(input int seq);
    @(negedge clk);
    chk(rd_req_ready, "request taken when idle");
    rd_req = 1; rd_seq = 32'(seq); @(negedge clk); rd_req = 0;
    chk(!rd_req_ready, "busy while reading");
    wait (got.size() == plen(seq)); repeat (3) @(negedge clk);
    chk(got.size() == plen(seq), "length");
    for (int w = 0; w < plen(seq); w++) begin
      chk(got[w] == {32'(seq), 32'(w)}, $sformatf("seq %0d word %0d got %h", seq, w, got[w]));
      chk(lastq[w] == (w == plen(seq) - 1), "out_last");
    end
    got.delete(); lastq.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 12; s++) begin
      write(s);
      if (s >= 3) read(s - $urandom_range(0, 3));
    end
    for (int s = 8; s < 12; s++) read(s);
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
