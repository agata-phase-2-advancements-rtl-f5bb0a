// Testbench for package_slicer (32-byte packets, i.e. 4 words). Buffers of 1 to 13 words,
// each with its length on in_len and in_last on its final word, are fed under random gaps and
// random backpressure. It checks that the words pass unchanged and in order, that each buffer
// is cut into packets of 4 words plus a shorter rest, that out_last ends each packet, that
// out_len gives the packet's length on every word and that out_seq counts packets.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_package_slicer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_last = 0, out_ready = 0;
  logic [63:0] in_data = '0;
  logic [15:0] in_len = '0;
  logic in_ready, out_valid, out_last;
  logic [63:0] out_data;
  logic [15:0] out_len;
  logic [31:0] out_seq;
  int checks = 0, failures = 0;
  int blen = 5, bpos = 0, nin = 0, nout = 0, pkts = 0, ppos = 0, left_exp = 5;

  package_slicer #(.PKT_BYTES(32)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int plen;
    plen = (left_exp > 4) ? 4 : left_exp;
    chk(out_data == 64'(nout), "data");
    chk(out_len == 16'(plen), $sformatf("out_len %0d exp %0d", out_len, plen));
    chk(out_seq == 32'(pkts), "out_seq");
    chk(out_last == (ppos == plen - 1), "out_last");
    nout++; ppos++;
    if (out_last) begin
      pkts++; ppos = 0; left_exp -= plen;
    end
    // the input side: next word
    nin++; bpos++;
    if (bpos == blen) begin
      bpos = 0; blen = $urandom_range(1, 13); left_exp = blen;
    end
  end
  always @(negedge clk) begin
    in_valid  = rst_n && ($urandom_range(0, 3) != 0) || (in_valid && !in_ready);
    in_data   = 64'(nin);
    in_len    = 16'(blen);
    in_last   = (bpos == blen - 1);
    out_ready = ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (4000) @(negedge clk);
    chk(pkts > 300, "packets sent");
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
