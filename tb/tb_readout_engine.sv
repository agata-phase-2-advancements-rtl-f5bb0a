// Testbench for readout_engine (4 sources). Each source model offers frames whose words
// carry {source, frame number, word number}; the output stream is parsed frame by frame.
// It checks the frame header {type, engine id, 0, frame count}, that every source frame
// arrives whole and in order, round-robin service while all sources are busy, that a
// disabled source is not served, IDLE frames after cfg_idle_period quiet clocks, SYSOFF
// frames instead while sys_off is set, and an ERROR frame after err.
module tb_readout_engine;
  import agata_pkg::*;
  localparam int NSRC = 4;
  localparam logic [7:0] EID = 8'd2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NSRC-1:0] src_valid = '0, src_ready, src_last = '0, cfg_enable = '1;
  logic [NSRC-1:0][63:0] src_data = '0;
  logic [NSRC-1:0][7:0] src_type;
  logic [15:0] cfg_idle_period = 16'd0;
  logic sys_off = 0, err = 0, out_valid, out_ready = 0, out_last;
  logic [63:0] out_data;
  logic [31:0] n_frames, n_idle;
  int checks = 0, failures = 0;
  bit  src_on [NSRC];
  int  s_frame [NSRC], s_word [NSRC], s_len [NSRC];
  int  exp_frame [NSRC];
  // parser state
  bit  in_frame = 0;
  int  cur_src, cur_word, hdr_count = 0;
  int  order [$];
  int  n_ctrl [3];            // IDLE, ERROR, SYSOFF

  readout_engine #(.NSRC(NSRC), .ENGINE_ID(EID)) dut (.*);

  assign src_type = {8'(PKT_MONITOR), 8'(PKT_SPECTRUM), 8'(PKT_LONGTRACE), 8'(PKT_EVENT)};
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // handshakes are sampled at the clock edge, the models react at the following negedge
  logic [NSRC-1:0] src_x = '0;
  logic out_x = 0, out_l = 0;
  logic [63:0] out_d;
  always @(posedge clk) begin
    src_x = src_valid & src_ready;
    out_x = out_valid && out_ready; out_d = out_data; out_l = out_last;
    #1 out_ready = ($urandom_range(0, 3) != 0);
  end
  always @(negedge clk) if (rst_n) begin
    // sources
    for (int s = 0; s < NSRC; s++) begin
      if (src_x[s]) begin
        if (src_last[s]) begin s_frame[s]++; s_word[s] = 0; end else s_word[s]++;
      end
      src_valid[s] = src_on[s] || s_word[s] != 0;   // a started frame is always finished
      src_data[s]  = {8'(s), 24'(s_frame[s]), 32'(s_word[s])};
      src_last[s]  = (s_word[s] == s_len[s] - 1);
    end
    // output parser
    if (out_x) begin
      if (!in_frame) begin
        logic [7:0] t;
        t = out_d[63:56];
        chk(out_d[55:48] == EID && out_d[47:32] == 0 && out_d[31:0] == 32'(hdr_count), "header fields");
        hdr_count++;
        if (t == PKT_IDLE || t == PKT_ERROR || t == PKT_SYSOFF) begin
          chk(out_l, "control frame is one word");
          n_ctrl[(t == PKT_IDLE) ? 0 : (t == PKT_ERROR) ? 1 : 2]++;
        end else begin
          cur_src = -1;
          for (int s = 0; s < NSRC; s++) if (t == src_type[s]) cur_src = s;
          chk(cur_src >= 0, "known type");
          order.push_back(cur_src);
          in_frame = 1; cur_word = 0;
        end
      end else begin
        chk(out_d == {8'(cur_src), 24'(exp_frame[cur_src]), 32'(cur_word)}, $sformatf("data %h", out_d));
        cur_word++;
        if (out_l) begin
          chk(cur_word == s_len[cur_src], "frame length");
          exp_frame[cur_src]++; in_frame = 0;
        end
      end
    end
  end

  initial begin
    for (int s = 0; s < NSRC; s++) s_len[s] = 3 + 2 * s;
    repeat (3) @(posedge clk); rst_n = 1;
    // all sources busy: strict rotation
    for (int s = 0; s < NSRC; s++) src_on[s] = 1;
    repeat (600) @(negedge clk);
    for (int s = 0; s < NSRC; s++) src_on[s] = 0;
    repeat (60) @(negedge clk);
    chk(order.size() > 20, "frames sent");
    begin
      bit rot;
      rot = 1;
      for (int i = 1; i < order.size(); i++) if (order[i] != (order[i - 1] + 1) % NSRC) rot = 0;
      chk(rot, "round robin");
    end
    for (int s = 0; s < NSRC; s++) chk(exp_frame[s] == s_frame[s], "all frames delivered");
    // disable source 2
    order.delete();
    cfg_enable = 4'b1011;
    for (int s = 0; s < NSRC; s++) src_on[s] = 1;
    repeat (300) @(negedge clk);
    src_on = '{0, 0, 0, 0};
    repeat (60) @(negedge clk);
    chk(!(2 inside {order}) && order.size() > 5, "disabled source skipped");
    cfg_enable = '1;
    repeat (60) @(negedge clk);
    chk(exp_frame[2] == s_frame[2], "source 2 drained after enable");
    // idle frames
    chk(n_ctrl[0] == 0, "no idle while off");
    cfg_idle_period = 16'd50;
    repeat (400) @(negedge clk);
    chk(n_ctrl[0] >= 5 && n_ctrl[0] <= 8 && n_idle == 32'(n_ctrl[0]), "idle frames");
    sys_off = 1;
    repeat (200) @(negedge clk);
    chk(n_ctrl[2] >= 2, "sysoff frames");
    sys_off = 0;
    err = 1; @(negedge clk); err = 0;
    repeat (20) @(negedge clk);
    chk(n_ctrl[1] == 1, "error frame");
    chk(n_frames == 32'(hdr_count), "frame counter");
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
