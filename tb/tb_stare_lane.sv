// Testbench for stare_lane (32-word buffers closed at 16 words, 8-word packets, a window of
// 4 packets, time-out 300 clocks) with the server model, which drops the first transmission
// of every seventh packet. First the counter data generator feeds the lane: every packet
// must reach the server, re-transmitted where it was dropped, and the packets must join into
// one gap-free count; the data stopper must have held packets back while the window was
// full. Then the source is switched to the Aurora input, fed with frames of known words, and
// every word must arrive. Counters (buffer toggles, frames, re-transmissions, acknowledges)
// are compared with what the server saw.
module tb_stare_lane;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] cfg_buf_bytes = 16'd128, cfg_gen_words = 16'd20, cfg_src_port = 16'd5000, cfg_dst_port = 16'd6000;
  logic cfg_gen_enable = 0, cfg_rudp_enable = 1;
  logic [31:0] cfg_rudp_timeout = 32'd300, cfg_src_ip = 32'h0A000001, cfg_dst_ip = 32'h0A000002;
  logic [47:0] cfg_src_mac = 48'h020000000001, cfg_dst_mac = 48'h020000000002;
  logic au_valid = 0, au_last = 0;
  logic [63:0] au_data = '0;
  logic au_ready, mac_valid, mac_ready, mac_last, rx_valid, rx_last;
  logic [63:0] mac_data, rx_data;
  logic [31:0] n_toggles, n_gen_packets, n_acked, n_retx, n_frames;
  int checks = 0, failures = 0, stalls = 0;

  stare_lane #(.BUF_BYTES(256), .PKT_BYTES(64), .WINDOW(4)) dut (.*);
  stare_server #(.DROP_MOD(7), .DROP_AT(3), .ACK_DELAY(40)) u_srv (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (rst_n && dut.s_valid && !dut.pass) stalls++;

  initial begin
    int last_seq, sum;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    cfg_gen_enable = 1;
    repeat (6000) @(negedge clk);
    cfg_gen_enable = 0;
    repeat (3000) @(negedge clk);
    last_seq = int'(dut.s_seq) - 1;
    chk(last_seq > 50, "packets sent");
    chk(u_srv.stream_errors(last_seq) == 0, "gap-free counter stream at the server");
    chk(u_srv.n_dropped > 5 && n_retx == 32'(u_srv.n_retx) && u_srv.n_retx >= u_srv.n_dropped, "re-transmissions");
    chk(n_frames == 32'(u_srv.n_frames), "frame count");
    chk(n_acked == 32'(u_srv.n_acks) && dut.active == 0, "all acknowledged");
    chk(stalls > 0, "data stopper held packets while the window was full");
    chk(n_toggles > 0 && n_gen_packets > 0, "buffer toggles, generator packets");
    // Aurora input
    sum = 0;
    for (int f = 0; f < 30; f++) begin
      int len;
      len = 1 + f % 11;
      for (int w = 0; w < len; w++) begin
        au_valid = 1; au_data = {32'hA0A0A0A0, 16'(f), 16'(w)}; au_last = (w == len - 1);
        @(posedge clk); while (!au_ready) @(posedge clk);
        @(negedge clk);
      end
      au_valid = 0; sum += len;
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    repeat (4000) @(negedge clk);
    begin
      int got = 0;
      for (int s = last_seq + 1; s < int'(dut.s_seq); s++)
        if (u_srv.psize.exists(s)) got += u_srv.psize[s];
      chk(got == sum, $sformatf("Aurora words delivered %0d of %0d", got, sum));
    end
    chk(dut.active == 0 && n_acked == 32'(u_srv.n_acks), "all acknowledged after Aurora data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
