// Testbench for package_generator. A "new data" source and a "re-transmission" source each
// offer packets of 1 to 6 words whose words carry {source, packet, word}, with their length
// and sequence number alongside. It checks that every output packet is whole and not mixed
// with the other source, that out_len, out_seq and out_retx belong to the packet being sent,
// that both sources' packets all arrive in order, and that when both wait at a packet boundary
// the re-transmission goes first.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_package_generator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic new_valid = 0, new_last = 0, rtx_valid = 0, rtx_last = 0, out_ready = 0;
  logic [63:0] new_data = '0, rtx_data = '0;
  logic [15:0] new_len = '0, rtx_len = '0;
  logic [31:0] new_seq = '0, rtx_seq = '0;
  logic new_ready, rtx_ready, out_valid, out_last, out_retx;
  logic [63:0] out_data;
  logic [15:0] out_len;
  logic [31:0] out_seq;
  int checks = 0, failures = 0;
  // source state: [0] new, [1] re-transmission
  int s_pkt [2], s_word [2], s_len [2];
  int o_pkt [2];
  int cur = -1, o_word = 0, both_wait = 0, prio_ok = 0;

  package_generator dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (rst_n) begin
    if (cur < 0 && new_valid && rtx_valid && out_ready) begin
      both_wait++;
      if (out_retx) prio_ok++;
    end
    if (out_valid && out_ready) begin
      int s;
      s = out_retx ? 1 : 0;
      if (cur < 0) begin cur = s; o_word = 0; end
      chk(s == cur, "packet not interleaved");
      chk(out_data == {8'(s), 24'(o_pkt[s]), 32'(o_word)}, $sformatf("data %h", out_data));
      chk(out_len == 16'(2 + o_pkt[s] % 5) && out_seq == 32'(1000 * s + o_pkt[s]), "len/seq");
      o_word++;
      if (out_last) begin
        chk(o_word == 2 + o_pkt[s] % 5, "packet length");
        o_pkt[s]++; cur = -1;
      end
    end
    if (new_valid && new_ready) begin
      if (new_last) begin s_pkt[0]++; s_word[0] = 0; end else s_word[0]++;
    end
    if (rtx_valid && rtx_ready) begin
      if (rtx_last) begin s_pkt[1]++; s_word[1] = 0; end else s_word[1]++;
    end
  end
  always @(negedge clk) begin
    if (!(new_valid && !new_ready)) new_valid = rst_n && ($urandom_range(0, 2) != 0);
    if (!(rtx_valid && !rtx_ready)) rtx_valid = rst_n && ($urandom_range(0, 5) == 0);
    new_data = {8'd0, 24'(s_pkt[0]), 32'(s_word[0])};
    rtx_data = {8'd1, 24'(s_pkt[1]), 32'(s_word[1])};
    new_len = 16'(2 + s_pkt[0] % 5); rtx_len = 16'(2 + s_pkt[1] % 5);
    new_seq = 32'(s_pkt[0]); rtx_seq = 32'(1000 + s_pkt[1]);
    new_last = (s_word[0] == 1 + s_pkt[0] % 5);
    rtx_last = (s_word[1] == 1 + s_pkt[1] % 5);
    out_ready = ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5000) @(negedge clk);
    chk(o_pkt[0] > 200 && o_pkt[1] > 50, "both sources served");
    chk(o_pkt[0] >= s_pkt[0] - 1 && o_pkt[1] >= s_pkt[1] - 1, "nothing lost");
    chk(both_wait > 10 && prio_ok == both_wait, $sformatf("re-transmission first %0d/%0d", prio_ok, both_wait));
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
