// Testbench for event_buffer (two 128-byte buffers, cfg_bytes = 64, i.e. 8 words). A
// counting word stream with random frame ends (in_last) and random gaps is written while the
// reader applies random backpressure. A reference model cuts the stream into buffers of at
// most 8 words, closed early by in_last. It checks every output word in order, out_last and
// out_len for each buffer, n_toggles, that writing went on while the other buffer was read,
// and that the writer was held off while both buffers were full.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_event_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] cfg_bytes = 16'd64;
  logic in_valid = 0, in_last = 0, out_ready = 0;
  logic [63:0] in_data = '0;
  logic in_ready, out_valid, out_last;
  logic [63:0] out_data;
  logic [15:0] out_len;
  logic [31:0] n_toggles;
  int checks = 0, failures = 0;
  int exp_len [$];           // length of each buffer the model closed
  int fill = 0, nin = 0, nout = 0, in_buf = 0, overlap = 0, held = 0;
  int rd_word = 0, ntog = 0;
  bit stop_in = 0;

  event_buffer #(.MAX_BYTES(128)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready && out_valid && out_ready) overlap++;
    if (in_valid && !in_ready) held++;
    if (in_valid && in_ready) begin
      fill++; nin++;
      if (in_last || fill == 8) begin exp_len.push_back(fill); fill = 0; ntog++; end
    end
    if (out_valid && out_ready) begin
      chk(out_data == 64'(nout), "data order");
      chk(exp_len.size() > 0 && out_len == 16'(exp_len[0]), "out_len");
      chk(out_last == (rd_word == exp_len[0] - 1), "out_last");
      nout++; rd_word++;
      if (out_last) begin void'(exp_len.pop_front()); rd_word = 0; end
    end
  end
  always @(negedge clk) if (rst_n) begin
    // a word not yet taken stays on the inputs; the model has counted the last one taken
    if (!(in_valid && !in_ready)) begin
      if (stop_in && in_valid && in_last) in_valid = 0;
      else if (stop_in) begin in_valid = 1; in_data = 64'(nin); in_last = 1; end
      else begin
      in_valid = ($urandom_range(0, 4) != 0);
      in_data  = 64'(nin);
      in_last  = ($urandom_range(0, 11) == 0);
      end
    end
    out_ready = ($time < 3000) ? 1'b0 : ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3000) @(negedge clk);
    stop_in = 1;
    repeat (100) @(negedge clk);
    chk(nin > 1000 && nout == nin, $sformatf("all words out %0d %0d", nin, nout));
    chk(n_toggles == 32'(ntog) && exp_len.size() == 0 && fill == 0, "buffers drained");
    chk(overlap > 100, "write during read");
    chk(held > 0, "writer held while both buffers full");
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
