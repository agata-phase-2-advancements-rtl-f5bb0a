// Rate test for one STARE lane at its default sizes (16 kB toggle buffers, 8192-byte packets,
// a window of 16 frames) with reliable delivery on. The reference operating point is 50 kHz
// of 8 kB events per crystal, which at the 100 MHz clock leaves 2000 clocks per event.
// The test offers EVENTS events of 1024 64-bit words (8 kB) back to back on the Aurora input,
// with the buffer size set to 8 kB, to a server model that is always ready and acknowledges
// every frame after a short delay. It checks that every word of every event reaches the
// server in one frame per event, that all frames are acknowledged, and that the lane took
// no more than 2000 clocks per event on average from the first input word to the last
// frame at the server. The measured clocks per event are printed.
// Timing: a clock period of 10 time units stands for the 10 ns of 100 MHz; a watchdog ends the run with a failure counted if
// the test has not finished after a fixed number of cycles.
module tb_stare_rate;
  localparam int EVENTS = 20, WORDS = 1024, BUDGET = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] cfg_buf_bytes = 16'd8192, cfg_gen_words = 16'd1024, cfg_src_port = 16'd5000, cfg_dst_port = 16'd6000;
  logic cfg_gen_enable = 0, cfg_rudp_enable = 1;
  logic [31:0] cfg_rudp_timeout = 32'd20000, cfg_src_ip = 32'h0A000001, cfg_dst_ip = 32'h0A000002;
  logic [47:0] cfg_src_mac = 48'h020000000001, cfg_dst_mac = 48'h020000000002;
  logic au_valid = 0, au_last = 0;
  logic [63:0] au_data = '0;
  logic au_ready, mac_valid, mac_ready, mac_last, rx_valid, rx_last;
  logic [63:0] mac_data, rx_data;
  logic [31:0] n_toggles, n_gen_packets, n_acked, n_retx, n_frames;
  int checks = 0, failures = 0;
  longint t_first, t_last;

  stare_lane dut (.*);
  stare_server #(.DROP_MOD(0), .ACK_DELAY(40), .RANDOM_READY(0)) u_srv (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // the source: events back to back, word w of event e = {e, w}
  initial begin
    int e, w;
    e = 0; w = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    t_first = -1;
    while (e < EVENTS) begin
      au_valid = 1; au_data = {32'hE0E0E0E0, 16'(e), 16'(w)}; au_last = (w == WORDS - 1);
      @(posedge clk);
      if (au_ready) begin
        if (t_first < 0) t_first = longint'($time / 10);
        if (w == WORDS - 1) begin w = 0; e++; end else w++;
      end
      @(negedge clk);
    end
    au_valid = 0; au_last = 0;
  end

  initial begin
    int got;
    longint per;
    wait (rst_n);
    wait (u_srv.n_frames >= EVENTS);
    t_last = longint'($time / 10);
    repeat (200) @(negedge clk);
    got = 0;
    for (int s = 0; s < EVENTS; s++) if (u_srv.psize.exists(s)) got += u_srv.psize[s];
    chk(u_srv.n_frames == EVENTS, $sformatf("one frame per event (%0d)", u_srv.n_frames));
    chk(got == EVENTS * WORDS, $sformatf("words delivered %0d of %0d", got, EVENTS * WORDS));
    chk(u_srv.n_bad == 0 && u_srv.n_dup == 0 && n_retx == 0, "no bad, duplicate or re-sent frame");
    chk(n_acked == 32'(EVENTS) && dut.active == 0, "all frames acknowledged");
    chk(n_toggles == 32'(EVENTS), "one buffer toggle per event");
    per = (t_last - t_first) / EVENTS;
    $display("clocks per 8 kB event: %0d (budget %0d at 50 kHz and 100 MHz)", per, BUDGET);
    chk(per <= BUDGET, "50 kHz of 8 kB events sustained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (EVENTS * BUDGET * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
