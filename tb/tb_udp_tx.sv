// Testbench for udp_tx. Packets of 1 to 9 payload words with random sequence numbers and
// re-transmission flags pass under random backpressure. For each, the testbench gathers the
// 48 header bytes and checks them field by field against its own layout: MAC addresses and
// EtherType 0x0800, an IPv4 header (version 4, 20 bytes, don't-fragment, TTL 64, UDP) whose
// checksum it verifies by summing all ten 16-bit words to 0xFFFF, the UDP ports and length,
// the 32-bit sequence number and the re-transmission flag. It also checks the payload words,
// out_last and that tx_start pulses once per packet with the packet's number.
// Timing: a free-running clock drives the block; a watchdog ends the run with a failure
// counted if the test has not finished after a fixed number of cycles.
module tb_udp_tx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [47:0] cfg_src_mac = 48'h02_00_00_00_00_11, cfg_dst_mac = 48'h02_00_00_00_00_99;
  logic [31:0] cfg_src_ip = 32'hC0A8_0A05, cfg_dst_ip = 32'hC0A8_0A64;
  logic [15:0] cfg_src_port = 16'd50000, cfg_dst_port = 16'd50010;
  logic in_valid = 0, in_last = 0, in_retx = 0, out_ready = 0;
  logic [63:0] in_data = '0;
  logic [15:0] in_len = '0;
  logic [31:0] in_seq = '0;
  logic in_ready, out_valid, out_last, tx_start;
  logic [63:0] out_data;
  logic [31:0] tx_seq;
  int checks = 0, failures = 0, npk = 0, starts = 0, lasts = 0;
  logic [63:0] words [$];

  udp_tx dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (rst_n) begin
    if (tx_start) begin starts++; chk(tx_seq == in_seq, "tx_seq"); end
    if (out_valid && out_ready) begin words.push_back(out_data); if (out_last) lasts++; end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  task automatic send(input int len, input logic [31:0] seq, input logic retx);
    logic [7:0] b [48];
    logic [19:0] s;
    int w;
    words.delete();
    in_len = 16'(len); in_seq = seq; in_retx = retx;
    w = 0;
    while (w < len) begin
      in_valid = 1; in_data = {seq, 32'(w)}; in_last = (w == len - 1);
      @(posedge clk);
      if (in_valid && in_ready) w++;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (2) @(negedge clk);
    chk(words.size() == 6 + len, "word count");
    for (int i = 0; i < 48; i++) b[i] = words[i / 8][63 - 8 * (i % 8) -: 8];
    chk({b[0], b[1], b[2], b[3], b[4], b[5]} == cfg_dst_mac, "dst mac");
    chk({b[6], b[7], b[8], b[9], b[10], b[11]} == cfg_src_mac, "src mac");
    chk({b[12], b[13]} == 16'h0800 && b[14] == 8'h45, "ethertype, IPv4");
    chk({b[16], b[17]} == 16'(20 + 8 + 6 + 8 * len), "ip total length");
    chk({b[20], b[21]} == 16'h4000 && b[22] == 8'd64 && b[23] == 8'd17, "flags ttl protocol");
    s = 0;
    for (int i = 14; i < 34; i += 2) s += 20'({b[i], b[i + 1]});
    s = (s & 20'hFFFF) + (s >> 16); s = (s & 20'hFFFF) + (s >> 16);
    chk(s == 20'hFFFF, "ip header checksum");
    chk({b[26], b[27], b[28], b[29]} == cfg_src_ip && {b[30], b[31], b[32], b[33]} == cfg_dst_ip, "ip addresses");
    chk({b[34], b[35]} == cfg_src_port && {b[36], b[37]} == cfg_dst_port, "ports");
    chk({b[38], b[39]} == 16'(8 + 6 + 8 * len), "udp length");
    chk({b[42], b[43], b[44], b[45]} == seq && b[47][0] == retx, "sequence and flag");
    for (int i = 0; i < len; i++) chk(words[6 + i] == {seq, 32'(i)}, "payload");
    npk++;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      send($urandom_range(1, 9), $urandom, 1'($urandom_range(0, 1)));
      cfg_src_ip = $urandom;
    end
    chk(starts == npk, "one tx_start per packet");
    chk(lasts == npk, "one out_last per packet");
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
