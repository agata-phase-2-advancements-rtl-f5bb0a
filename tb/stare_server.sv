// stare_server: behavioural model of the receiving server of one STARE lane, for testbenches.
// It takes the Ethernet/IPv4/UDP frames of the lane (six 64-bit header words, then the
// payload), reads the 32-bit sequence number and the re-transmission flag from header word 5,
// and answers each frame after ACK_DELAY clocks with an acknowledge frame on the lane's
// receive stream: six header words and one payload word {0x41434B00, sequence number}.
// To exercise the selective repeat, the first transmission of every sequence number with
// seq % DROP_MOD == DROP_AT is thrown away unanswered (DROP_MOD = 0: none). The payload of
// every frame kept is recorded by sequence number; stream_errors() checks, for a lane fed by
// the counter data generator, that the packets join into one gap-free count. mac_ready is
// random when RANDOM_READY is set.
module stare_server #(
  parameter int DROP_MOD     = 0,
  parameter int DROP_AT      = 3,
  parameter int ACK_DELAY    = 40,
  parameter bit RANDOM_READY = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mac_valid,
  output logic        mac_ready,
  input  logic [63:0] mac_data,
  input  logic        mac_last,
  output logic        rx_valid,
  output logic [63:0] rx_data,
  output logic        rx_last
);
  int      n_frames = 0, n_dropped = 0, n_retx = 0, n_acks = 0, n_dup = 0, n_bad = 0;
  int      w = 0;
  longint  now = 0;
  logic [31:0] seq;
  logic    retx;
  longint  first_word;
  int      plen;
  bit      consec;
  longint  pfirst [int];
  int      psize  [int];
  int      ack_q  [$];
  longint  ack_t  [$];
  int      tx_w = 0;
  int      tx_seq;

  initial begin mac_ready = 0; rx_valid = 0; rx_data = '0; rx_last = 0; end
  always @(posedge clk) now++;

  always @(posedge clk) if (rst_n && mac_valid && mac_ready) begin
    if (w == 5) begin seq = mac_data[47:16]; retx = mac_data[0]; end
    if (w == 6) begin first_word = longint'(mac_data); plen = 0; consec = 1; end
    if (w >= 6) begin
      if (longint'(mac_data) != first_word + plen) consec = 0;
      plen++;
    end
    w++;
    if (mac_last) begin
      w = 0;
      n_frames++;
      if (retx) n_retx++;
      if (!retx && DROP_MOD != 0 && int'(seq) % DROP_MOD == DROP_AT) n_dropped++;
      else begin
        if (pfirst.exists(int'(seq))) n_dup++;
        pfirst[int'(seq)] = first_word;
        psize[int'(seq)]  = plen;
        if (!consec) n_bad++;
        ack_q.push_back(int'(seq));
        ack_t.push_back(now + ACK_DELAY);
      end
    end
  end

  // acknowledge frames, one at a time
  always @(negedge clk) begin
    mac_ready = !rst_n ? 1'b0 : (RANDOM_READY ? ($urandom_range(0, 4) != 0) : 1'b1);
    rx_valid = 0; rx_last = 0;
    if (rst_n) begin
      if (tx_w == 0 && ack_q.size() > 0 && ack_t[0] <= now) begin
        tx_seq = ack_q.pop_front(); void'(ack_t.pop_front());
        tx_w = 1;
      end
      if (tx_w > 0) begin
        rx_valid = 1;
        rx_data  = (tx_w <= 6) ? {32'hA5A5_0000 + 32'(tx_w), 32'h0} : {32'h41434B00, 32'(tx_seq)};
        rx_last  = (tx_w == 7);
        if (tx_w == 7) begin tx_w = 0; n_acks++; end else tx_w++;
      end
    end
  end

  // counter data: packets 0..last_seq must follow each other without a gap
  function automatic int stream_errors(input int last_seq);
    int e = 0;
    for (int s = 0; s <= last_seq; s++) begin
      if (!pfirst.exists(s)) begin e++; continue; end
      if (s > 0 && pfirst.exists(s - 1) && pfirst[s] != pfirst[s - 1] + psize[s - 1]) e++;
    end
    return e + n_bad;
  endfunction
endmodule
