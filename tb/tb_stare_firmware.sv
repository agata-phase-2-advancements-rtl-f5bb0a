// Testbench for stare_firmware at its full size: four lanes, 16 kB toggle buffers cut at
// 8 kB, 8 kB packets, a window of 16 packets. Lanes 0 and 2 run the counter data generator,
// lanes 1 and 3 take Aurora frames of known words; each lane has its own server model, and
// lane 0's server drops the first transmission of every fifth packet. It checks, per lane,
// that the frames carry the lane's own UDP source port and destination address, that the
// generator lanes deliver a gap-free count, that the Aurora lanes deliver every word, and
// that lane 0 re-transmitted what was dropped while the other lanes did not need to.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_stare_firmware;
  localparam int NL = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] cfg_buf_bytes = 16'd8192, cfg_gen_words = 16'd700, cfg_src_port = 16'd40000, cfg_dst_port = 16'd40100;
  logic [NL-1:0] cfg_gen_enable = '0;
  logic cfg_rudp_enable = 1;
  logic [31:0] cfg_rudp_timeout = 32'd3000, cfg_src_ip = 32'h0A000010;
  logic [47:0] cfg_src_mac = 48'h020000000010;
  logic [NL-1:0][47:0] cfg_dst_mac;
  logic [NL-1:0][31:0] cfg_dst_ip;
  logic [NL-1:0] au_valid = '0, au_last = '0, au_ready, mac_valid, mac_ready, mac_last, rx_valid, rx_last;
  logic [NL-1:0][63:0] au_data = '0, mac_data, rx_data;
  logic [NL-1:0][31:0] n_toggles, n_gen_packets, n_acked, n_retx, n_frames;
  int checks = 0, failures = 0;
  int hdr_bad [NL];
  int fw [NL];
  int au_sent [NL];
  bit au_done [NL];

  stare_firmware dut (.*);

  for (genvar l = 0; l < NL; l++) begin : g_srv
    stare_server #(.DROP_MOD(l == 0 ? 5 : 0), .DROP_AT(2), .ACK_DELAY(100)) u_srv (
      .clk, .rst_n, .mac_valid(mac_valid[l]), .mac_ready(mac_ready[l]), .mac_data(mac_data[l]),
      .mac_last(mac_last[l]), .rx_valid(rx_valid[l]), .rx_data(rx_data[l]), .rx_last(rx_last[l]));
    // header word 4: destination address low half, source port, destination port
    always @(posedge clk) if (rst_n && mac_valid[l] && mac_ready[l]) begin
      if (fw[l] == 4 && mac_data[l][63:16] != {cfg_dst_ip[l][15:0], 16'(cfg_src_port + l), cfg_dst_port})
        hdr_bad[l]++;
      fw[l] = mac_last[l] ? 0 : fw[l] + 1;
    end
    // Aurora feeder for lanes 1 and 3
    if (l % 2 == 1) begin : g_au
      initial begin
        @(posedge rst_n);
        repeat (10) @(negedge clk);
        for (int f = 0; f < 40; f++) begin
          int len;
          len = 200 + 37 * f;
          for (int w = 0; w < len; w++) begin
            au_valid[l] = 1; au_data[l] = {16'(l), 16'(f), 32'(w)}; au_last[l] = (w == len - 1);
            @(posedge clk); while (!au_ready[l]) @(posedge clk);
            @(negedge clk);
          end
          au_valid[l] = 0; au_sent[l] += len;
        end
        au_done[l] = 1;
      end
    end
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic int delivered(input int l);
    int s = 0;
    case (l)
      0: foreach (g_srv[0].u_srv.psize[k]) s += g_srv[0].u_srv.psize[k];
      1: foreach (g_srv[1].u_srv.psize[k]) s += g_srv[1].u_srv.psize[k];
      2: foreach (g_srv[2].u_srv.psize[k]) s += g_srv[2].u_srv.psize[k];
      default: foreach (g_srv[3].u_srv.psize[k]) s += g_srv[3].u_srv.psize[k];
    endcase
    return s;
  endfunction

  initial begin
    for (int l = 0; l < NL; l++) begin
      cfg_dst_mac[l] = 48'h020000000100 + 48'(l); cfg_dst_ip[l] = 32'h0A000100 + 32'(l);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    cfg_gen_enable = 4'b0101;
    repeat (30000) @(negedge clk);
    cfg_gen_enable = '0;
    wait (au_done[1] && au_done[3]);
    repeat (8000) @(negedge clk);
    for (int l = 0; l < NL; l++) chk(hdr_bad[l] == 0 && n_frames[l] > 10, $sformatf("lane %0d headers", l));
    chk(g_srv[0].u_srv.stream_errors(int'(dut.g_lane[0].u_lane.s_seq) - 1) == 0, "lane 0 counter stream");
    chk(g_srv[2].u_srv.stream_errors(int'(dut.g_lane[2].u_lane.s_seq) - 1) == 0, "lane 2 counter stream");
    chk(delivered(1) == au_sent[1] && delivered(3) == au_sent[3] && au_sent[1] > 0,
        $sformatf("Aurora words %0d/%0d %0d/%0d", delivered(1), au_sent[1], delivered(3), au_sent[3]));
    chk(n_retx[0] > 0 && n_retx[1] == 0 && n_retx[2] == 0 && n_retx[3] == 0, "re-transmission on lane 0 only");
    chk(n_acked[0] == n_frames[0] - 32'(g_srv[0].u_srv.n_dropped), "lane 0 acknowledges");
    for (int l = 1; l < NL; l++) chk(n_acked[l] == n_frames[l], "acknowledges");
    chk(dut.g_lane[0].u_lane.active == 0, "lane 0 window empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
