// rudp_core: the Reliable UDP core of the selective repeat protocol.
// It follows every frame a STARE lane sends until the server acknowledges it. WINDOW frames
// may be outstanding; frame s uses slot s mod WINDOW. Life of a frame:
//  - data stopper: a new packet may pass only while its slot is free (admit_ok); when it
//    passes (admit) the slot becomes active;
//  - when the frame leaves through header extraction (tx_start with tx_seq) its time-out
//    countdown of cfg_timeout clocks starts (so time spent reading back from memory does
//    not count);
//    a frame admitted in the same clock as its tx_start is armed at once;
//  - an acknowledgement (ack_valid with ack_seq) before the time-out frees the slot; a
//    duplicate or stale acknowledgement is ignored;
//  - at the time-out the core asks the memory interface to read the frame back
//    (rtx_valid/rtx_ready with rtx_seq, one request at a time, lowest slot first) and the
//    frame waits, active, for its next pass through header extraction.
// With cfg_enable low every packet is admitted and nothing is tracked. The frame lifecycle
// follows the document's description of the RUDP core; the window size and the single
// request register are this design's choice.
// Timing: admit, tx_start and ack each take effect in the clock they are seen; the timers
// count down one per clock.
module rudp_core #(
  parameter int unsigned WINDOW = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_enable,
  input  logic [31:0]  cfg_timeout,
  input  logic [31:0]  admit_seq,
  output logic         admit_ok,
  input  logic         admit,
  input  logic         tx_start,
  input  logic [31:0]  tx_seq,
  input  logic         ack_valid,
  input  logic [31:0]  ack_seq,
  output logic         rtx_valid,
  input  logic         rtx_ready,
  output logic [31:0]  rtx_seq,
  output logic [WINDOW-1:0] active,
  output logic [31:0]  n_acked,
  output logic [31:0]  n_timeouts
);
  localparam int unsigned SA = $clog2(WINDOW);
  typedef enum logic [1:0] {R_FREE, R_WAIT, R_TIMING, R_EXPIRED} rstate_t;
  rstate_t      st  [WINDOW];
  logic [31:0]  seq [WINDOW];
  logic [31:0]  tmr [WINDOW];

  logic          exp_v;
  logic [SA-1:0] exp_s;
  always_comb begin
    exp_v = 1'b0; exp_s = '0;
    for (int s = int'(WINDOW) - 1; s >= 0; s--)
      if (st[s] == R_EXPIRED) begin exp_v = 1'b1; exp_s = SA'(s); end
    for (int s = 0; s < int'(WINDOW); s++) active[s] = (st[s] != R_FREE);
  end
  assign admit_ok = !cfg_enable || st[admit_seq[SA-1:0]] == R_FREE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(WINDOW); s++) begin st[s] <= R_FREE; seq[s] <= '0; tmr[s] <= '0; end
      rtx_valid <= 1'b0; rtx_seq <= '0; n_acked <= '0; n_timeouts <= '0;
    end else if (cfg_enable) begin
      for (int s = 0; s < int'(WINDOW); s++)
        if (st[s] == R_TIMING) begin
          if (tmr[s] <= 32'd1) begin
            st[s] <= R_EXPIRED;
            n_timeouts <= n_timeouts + 1'b1;
          end else tmr[s] <= tmr[s] - 1'b1;
        end
      if (admit && admit_ok) begin
        st[admit_seq[SA-1:0]]  <= R_WAIT;
        seq[admit_seq[SA-1:0]] <= admit_seq;
      end
      // the timer starts when the frame's first word goes out; a packet may be admitted in
      // that same clock
      if (tx_start && ((st[tx_seq[SA-1:0]] == R_WAIT && seq[tx_seq[SA-1:0]] == tx_seq)
                       || (admit && admit_ok && admit_seq == tx_seq))) begin
        st[tx_seq[SA-1:0]]  <= R_TIMING;
        tmr[tx_seq[SA-1:0]] <= cfg_timeout;
      end
      if (ack_valid && st[ack_seq[SA-1:0]] != R_FREE && seq[ack_seq[SA-1:0]] == ack_seq) begin
        st[ack_seq[SA-1:0]] <= R_FREE;
        n_acked <= n_acked + 1'b1;
      end
      if (rtx_valid && rtx_ready) rtx_valid <= 1'b0;
      if ((!rtx_valid || rtx_ready) && exp_v
          && !(ack_valid && ack_seq[SA-1:0] == exp_s && seq[exp_s] == ack_seq)) begin
        rtx_valid  <= 1'b1;
        rtx_seq    <= seq[exp_s];
        st[exp_s]  <= R_WAIT;
      end
    end else begin
      for (int s = 0; s < int'(WINDOW); s++) st[s] <= R_FREE;
      rtx_valid <= 1'b0;
    end
  end

  a_rtx_stable: assert property (@(posedge clk) disable iff (!rst_n)
      rtx_valid && !rtx_ready && cfg_enable |=> rtx_valid && $stable(rtx_seq));
endmodule
