// gts_leaf: the pre-processing board's end of the GTS tree.
// It keeps the local 48-bit timestamp (one tick per 10 ns sample strobe), loaded with the
// global value during alignment (ts_load). A local trigger from the selected channel
// (normally the core) is accepted when nothing inhibits it: the backpressure input (the
// readout chain cannot keep up), a full event memory, or a request still waiting on the
// tree. An accepted trigger starts an event (evt_trig, with the timestamp in evt_ts) and
// sends a trigger request {leaf, ts} up the tree with a valid/ready handshake. Replies from
// the tree addressed to this leaf are passed to the event memory as validations or
// rejections. Counters keep the request, validation, rejection and inhibit rates.
// The function follows the document; the message layout and handshake are this design's.
// Timing: the timestamp advances by one per sample strobe (smp_en); a request is held until
// req_ready accepts it; inhibit is combinational and applies to a trigger in the same clock.
module gts_leaf
  import agata_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              smp_en,
  input  logic [LEAF_W-1:0] leaf_id,
  input  logic              ts_load,
  input  ts_t               ts_load_val,
  output ts_t               ts,
  input  logic              local_trig,
  input  logic              backpressure,
  input  logic              mem_full,
  output logic              evt_trig,
  output ts_t               evt_ts,
  // trigger request to the GTS tree
  output logic              req_valid,
  input  logic              req_ready,
  output gts_req_t          req,
  // reply from the GTS tree
  input  logic              rep_valid,
  input  gts_reply_t        rep,
  output logic              val_valid,
  output ts_t               val_ts,
  output logic              val_accept,
  output logic [31:0]       n_requests,
  output logic [31:0]       n_accepted,
  output logic [31:0]       n_rejected,
  output logic [31:0]       n_inhibited
);
  logic inhibit;
  assign inhibit = backpressure || mem_full || (req_valid && !req_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= '0; evt_trig <= 1'b0; evt_ts <= '0; req_valid <= 1'b0; req <= '0;
      val_valid <= 1'b0; val_ts <= '0; val_accept <= 1'b0;
      n_requests <= '0; n_accepted <= '0; n_rejected <= '0; n_inhibited <= '0;
    end else begin
      evt_trig  <= 1'b0;
      val_valid <= 1'b0;
      if (ts_load)     ts <= ts_load_val;
      else if (smp_en) ts <= ts + 1'b1;
      if (req_valid && req_ready) req_valid <= 1'b0;
      if (local_trig) begin
        if (inhibit) begin
          n_inhibited <= n_inhibited + 1'b1;
        end else begin
          evt_trig   <= 1'b1;
          evt_ts     <= ts;
          req_valid  <= 1'b1;
          req        <= '{leaf: leaf_id, ts: ts};
          n_requests <= n_requests + 1'b1;
        end
      end
      if (rep_valid && rep.leaf == leaf_id) begin
        val_valid  <= 1'b1;
        val_ts     <= rep.ts;
        val_accept <= rep.accept;
        if (rep.accept) n_accepted <= n_accepted + 1'b1;
        else            n_rejected <= n_rejected + 1'b1;
      end
    end
  end

  // A request stays stable until the tree takes it.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=> req_valid && $stable(req));
endmodule
