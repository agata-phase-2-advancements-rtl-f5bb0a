// Testbench for spectra (3 channels, 16 bins). Random energies go to all channels and a
// reference histogram counts them; every channel is then read out (header, two bins per
// word, out_last) under random backpressure and compared. It also checks the overflow
// counter for energies above the last bin, the drop counter for a channel that gets a new
// energy before the previous one was filed, the per-channel fine gain (cfg_shift) and that
// a clear empties all spectra.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_spectra;
  localparam int CH = 3, BINS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [CH-1:0] e_valid = '0;
  logic [CH-1:0][15:0] energy = '0;
  logic [3:0] cfg_shift = 4'd2;
  logic clear = 0, req = 0, out_ready = 0;
  logic [7:0] req_ch = '0;
  logic busy, out_valid, out_last;
  logic [63:0] out_data;
  logic [31:0] n_overflow, n_dropped;
  int checks = 0, failures = 0;
  int ref_h [CH][BINS];
  int n_over = 0;
  logic [63:0] got [$];
  logic lastflag [$];

  spectra #(.CH(CH), .BINS(BINS)) dut (.*);

  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 2) != 0);
    if (rst_n && out_valid && out_ready) begin got.push_back(out_data); lastflag.push_back(out_last); end
  end
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic read_all();
    for (int c = 0; c < CH; c++) begin
      @(negedge clk); req = 1; req_ch = 8'(c); @(negedge clk); req = 0;
      wait (got.size() == 1 + BINS / 2);
      repeat (3) @(negedge clk);
      chk(got[0] == {8'h00, 8'(c), 16'(BINS), 32'h0}, "header");
      for (int w = 0; w < BINS / 2; w++) begin
        chk(got[w + 1] == {32'(ref_h[c][2 * w + 1]), 32'(ref_h[c][2 * w])},
            $sformatf("ch%0d word%0d got %h", c, w, got[w + 1]));
        chk(lastflag[w + 1] == (w == BINS / 2 - 1), "last");
      end
      got.delete(); lastflag.delete();
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (!busy);                          // clear after reset
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      for (int c = 0; c < CH; c++) begin
        energy[c] = 16'($urandom_range(0, 4 * BINS + 7));
        if ((energy[c] >> cfg_shift) < BINS) ref_h[c][energy[c] >> cfg_shift]++;
        else n_over++;
      end
      e_valid = '1; @(negedge clk); e_valid = '0;
      repeat ($urandom_range(3, 6)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    chk(n_overflow == 32'(n_over) && n_over > 0, "overflow count");
    chk(n_dropped == 0, "no drops yet");
    read_all();
    // back-to-back energies: channel 0 is filed at once, 1 and 2 lose the second value
    energy = '{16'd4, 16'd4, 16'd4};
    e_valid = '1; @(negedge clk); @(negedge clk); e_valid = '0;
    ref_h[0][1] += 2; ref_h[1][1]++; ref_h[2][1]++;
    repeat (5) @(negedge clk);
    chk(n_dropped == 2, "drop count");
    read_all();
    // clear
    clear = 1; @(negedge clk); clear = 0;
    chk(busy, "clearing");
    wait (!busy);
    foreach (ref_h[c, b]) ref_h[c][b] = 0;
    read_all();
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
