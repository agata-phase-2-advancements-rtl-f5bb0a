// Testbench for long_trace (3 channels, 40-sample depth). Samples carry their channel and
// sample number. It asks for the last N samples of a channel, for N = 40 (the whole memory),
// 13 (a partial final word) and 1, under random backpressure, and checks the header, every
// sample, the zero padding and out_last; it also checks that requests beyond the depth or
// for a missing channel are ignored and that recording resumes after a readout.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_long_trace;
  localparam int CH = 3, DEPTH = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic smp_en = 0, req = 0, out_ready = 0;
  logic [CH-1:0][15:0] samples;
  logic [7:0] req_ch = '0;
  logic [15:0] req_len = '0;
  logic busy, out_valid, out_last;
  logic [63:0] out_data;
  int checks = 0, failures = 0, n = 0;
  logic [63:0] got [$];
  logic lastflag [$];

  long_trace #(.CH(CH), .DEPTH(DEPTH)) dut (.*);

  always_comb for (int c = 0; c < CH; c++) samples[c] = 16'((c << 12) | (n & 12'hFFF));
  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 2) != 0);
    if (rst_n && out_valid && out_ready) begin got.push_back(out_data); lastflag.push_back(out_last); end
  end
  initial forever begin
    repeat (3) @(negedge clk);
    if (!busy) begin smp_en = 1; @(negedge clk); smp_en = 0; n++; end
    else @(negedge clk);
  end
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic ask(input int ch, input int len);
    int last_n, nw;
    @(posedge smp_en); @(negedge clk);
    last_n = n - 1;               // newest stored sample
    req = 1; req_ch = 8'(ch); req_len = 16'(len); @(negedge clk); req = 0;
    nw = (len + 3) / 4;
    wait (got.size() == nw + 1);
    repeat (5) @(negedge clk);
    chk(got.size() == nw + 1, "word count");
    chk(got[0] == {8'h00, 8'(ch), 16'(len), 32'h0}, "header");
    for (int w = 0; w < nw; w++) begin
      logic [63:0] e;
      for (int k = 0; k < 4; k++) begin
        int s; s = 4 * w + k;
        e[16 * k +: 16] = (s < len) ? 16'((ch << 12) | ((last_n - len + 1 + s) & 12'hFFF)) : 16'h0;
      end
      chk(got[w + 1] == e, $sformatf("ch%0d len%0d word %0d got %h exp %h", ch, len, w, got[w + 1], e));
      chk(lastflag[w + 1] == (w == nw - 1), "last flag");
    end
    got.delete(); lastflag.delete();
    chk(!busy, "idle again");
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (300) @(negedge clk);
    ask(1, 40);
    repeat (200) @(negedge clk);
    ask(2, 13);
    repeat (50) @(negedge clk);
    ask(0, 1);
    // invalid requests
    req = 1; req_ch = 8'd1; req_len = 16'(DEPTH + 1); @(negedge clk);
    req_ch = 8'(CH); req_len = 16'd4; @(negedge clk);
    req_len = 16'd0; req_ch = 8'd0; @(negedge clk); req = 0;
    repeat (20) @(negedge clk);
    chk(!busy && got.size() == 0, "invalid requests ignored");
    repeat (200) @(negedge clk);
    ask(2, 40);
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
