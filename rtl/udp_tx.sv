// udp_tx: the UDP interface of a STARE lane. It turns each packet (up to a 8192-byte jumbo
// payload) into an Ethernet frame for the 10 Gbps network stack by sending six header words
// before the payload:
//   bytes  0..13  Ethernet: destination MAC, source MAC, EtherType 0x0800
//   bytes 14..33  IPv4: version 4, IHL 5, total length, identification = seq[15:0],
//                 don't-fragment, TTL 64, protocol 17 (UDP), header checksum, addresses
//   bytes 34..41  UDP: ports, length, checksum 0 (not used, allowed for IPv4)
//   bytes 42..47  protocol data: frame sequence number (32 bits) and flags (bit 0:
//                 re-transmission)
// Bytes go out in network order, the first byte of a word in bits 63:56. The payload words
// follow unchanged and out_last ends the frame. tx_start pulses, with tx_seq, when the
// first header word leaves: this is the header-extraction point at which the RUDP time-out
// starts. The IPv4 checksum is the ones' complement of the ones' complement sum of the ten
// header half-words. Wrapping in UDP with added protocol data follows the document; the
// header fields and their values are the standard ones, the protocol data layout is this
// design's own.
// Timing: six header words, then the payload, at one word per clock while out_ready is high.
module udp_tx (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [47:0]  cfg_src_mac,
  input  logic [47:0]  cfg_dst_mac,
  input  logic [31:0]  cfg_src_ip,
  input  logic [31:0]  cfg_dst_ip,
  input  logic [15:0]  cfg_src_port,
  input  logic [15:0]  cfg_dst_port,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [63:0]  in_data,
  input  logic         in_last,
  input  logic [15:0]  in_len,
  input  logic [31:0]  in_seq,
  input  logic         in_retx,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [63:0]  out_data,
  output logic         out_last,
  output logic         tx_start,
  output logic [31:0]  tx_seq
);
  logic [2:0]   hw;       // header word index, 6 = payload
  logic [383:0] hdr;
  logic [15:0]  ip_len, udp_len, csum;
  logic [19:0]  sum;

  always_comb begin
    udp_len = 16'd8 + 16'd6 + (in_len << 3);
    ip_len  = 16'd20 + udp_len;
    sum = 20'h04500 + 20'(ip_len) + 20'(in_seq[15:0]) + 20'h04000 + 20'h04011
        + 20'(cfg_src_ip[31:16]) + 20'(cfg_src_ip[15:0])
        + 20'(cfg_dst_ip[31:16]) + 20'(cfg_dst_ip[15:0]);
    sum  = 20'(sum[15:0]) + 20'(sum[19:16]);
    sum  = 20'(sum[15:0]) + 20'(sum[19:16]);
    csum = ~sum[15:0];
    hdr = {cfg_dst_mac, cfg_src_mac, 16'h0800,
           8'h45, 8'h00, ip_len, in_seq[15:0], 16'h4000, 8'd64, 8'd17, csum,
           cfg_src_ip, cfg_dst_ip,
           cfg_src_port, cfg_dst_port, udp_len, 16'h0000,
           in_seq, 15'h0, in_retx};
  end

  always_comb begin
    if (hw < 3'd6) begin
      out_valid = in_valid;
      out_data  = hdr[383 - 64*hw -: 64];
      out_last  = 1'b0;
      in_ready  = 1'b0;
    end else begin
      out_valid = in_valid;
      out_data  = in_data;
      out_last  = in_last;
      in_ready  = out_ready;
    end
  end
  assign tx_start = out_valid && out_ready && hw == 3'd0;
  assign tx_seq   = in_seq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hw <= '0;
    else if (out_valid && out_ready) begin
      if (hw < 3'd6) hw <= hw + 1'b1;
      else if (in_last) hw <= '0;
    end
  end
endmodule
