// tp_fifo_event: the event FIFO of the GTS trigger processor. Every trigger request from
// the tree is stored with its arrival time (reference timestamp now_ts). The oldest stored
// request opens the analysis window of cfg_timeout ticks (the CFG_TIMEOUT register). If the
// logic equation is met (le_met) while requests are stored, all of them are validated: one
// accept reply per clock goes back down the tree. If the window of the oldest request ends
// without it, all stored requests are flushed with reject replies. A request marked late
// (it arrived inside an acceptance window that already led to a validation) is accepted as
// soon as it reaches the head. Replies use a valid/ready handshake; a request that finds
// the FIFO full is dropped and counted. The store / analysis-window / validate-or-flush
// behaviour follows the document; depth, drain order and the late-request path are this
// design's choice.
module tp_fifo_event
  import agata_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ts_t          now_ts,
  input  logic [31:0]  cfg_timeout,
  input  logic         req_valid,
  input  gts_req_t     req,
  input  logic         req_late,
  input  logic         le_met,
  output logic         rep_valid,
  input  logic         rep_ready,
  output gts_reply_t   rep,
  output logic [31:0]  n_accepted,
  output logic [31:0]  n_rejected,
  output logic [31:0]  n_dropped
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef struct packed { gts_req_t r; ts_t arr; logic late; } entry_t;
  typedef enum logic [1:0] {F_IDLE, F_ACC, F_REJ} fmode_t;
  entry_t         mem [DEPTH];
  logic [AW-1:0]  rp, wp;
  logic [AW:0]    count, left;
  fmode_t         mode;
  entry_t         head;
  logic           push, pop, acc_now;

  assign head    = mem[rp];
  assign acc_now = (mode == F_ACC) || (mode == F_IDLE && count != 0 && head.late);
  assign rep_valid = (mode != F_IDLE) || acc_now;
  assign rep     = '{leaf: head.r.leaf, ts: head.r.ts, accept: acc_now};
  assign pop     = rep_valid && rep_ready;
  assign push    = req_valid && (32'(count) < DEPTH);

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= '{r: req, arr: now_ts, late: req_late};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0; left <= '0; mode <= F_IDLE;
      n_accepted <= '0; n_rejected <= '0; n_dropped <= '0;
    end else begin
      if (req_valid && !push) n_dropped <= n_dropped + 1'b1;
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (pop) begin
        if (acc_now) n_accepted <= n_accepted + 1'b1;
        else         n_rejected <= n_rejected + 1'b1;
      end
      unique case (mode)
        F_IDLE:
          if (count != 0 && !head.late) begin
            if (le_met) begin mode <= F_ACC; left <= count; end
            else if ((now_ts - head.arr) >= ts_t'(cfg_timeout)) begin mode <= F_REJ; left <= count; end
          end
        default:
          if (pop) begin
            left <= left - 1'b1;
            if (left == 1) mode <= F_IDLE;
          end
      endcase
    end
  end

  a_rep_stable: assert property (@(posedge clk) disable iff (!rst_n)
      rep_valid && !rep_ready |=> rep_valid && $stable(rep));
endmodule
