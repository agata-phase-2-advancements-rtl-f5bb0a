// gts_trigger_processor: the 256-leaf GTS trigger processor at the top of the GTS tree.
// Trigger requests {leaf, ts} arrive from the ROOT (Aurora RX side, req_valid/req). The
// 48-bit reference (ts48_reference) is first started, manually or by learning from the
// leaves; until it runs, requests only feed the learning. Then every request goes to the
// event FIFO and to the NPART (eight) partitions it is assigned to (cfg_assign[leaf][p],
// any number of partitions per leaf). Each partition counts multiplicity against its
// threshold and opens its acceptance and coincidence windows; the logic equation over the
// coincidence windows decides, and the event FIFO answers every stored request with a
// validation or, at the end of its analysis window, a rejection, which goes back down the
// tree (rep_valid/rep, Aurora TX side). A request that comes in while an acceptance window
// of one of its partitions is open and that window has already led to a validation is
// accepted as late. The chain TS reference -> multiplicity -> acceptance -> coincidence ->
// logic equation -> FIFO event follows the document; configuration registers (IPbus there)
// are plain ports here.
// Timing: one request is taken per clock (req_valid/req_ready) and one reply given per clock
// (rep_valid/rep_ready); each stored request is decided at the latest cfg_timeout ticks
// after the first request of its analysis window.
module gts_trigger_processor
  import agata_pkg::*;
#(
  parameter int unsigned NLEAF = 256,
  parameter int unsigned NPART = 8,
  parameter int unsigned DEPTH = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cfg_mode,
  input  ts_t                           cfg_delay,
  input  logic [7:0]                    cfg_nb_samples,
  input  logic [NLEAF-1:0]              cfg_leaf_mask,
  input  logic [NLEAF-1:0][NPART-1:0]   cfg_assign,
  input  logic [NPART-1:0][15:0]        cfg_mult_win,
  input  logic [NPART-1:0][8:0]         cfg_threshold,
  input  logic [NPART-1:0][15:0]        cfg_acc_width,
  input  logic [NPART-1:0][15:0]        cfg_coinc_delay,
  input  logic [NPART-1:0][15:0]        cfg_coinc_width,
  input  logic [(1<<NPART)-1:0]         cfg_le_table,
  input  logic [31:0]                   cfg_timeout,
  input  logic                          req_valid,
  input  gts_req_t                      req,
  output logic                          rep_valid,
  input  logic                          rep_ready,
  output gts_reply_t                    rep,
  output ts_t                           ts,
  output logic                          ts_valid,
  output logic [1:0]                    ts_state,
  output logic [NPART-1:0]              coinc,
  output logic                          le_met,
  output logic [31:0]                   n_accepted,
  output logic [31:0]                   n_rejected,
  output logic [31:0]                   n_late
);
  ts48_reference #(.NLEAF(NLEAF)) u_ts (
    .clk, .rst_n, .cfg_mode, .cfg_delay, .cfg_nb_samples, .cfg_leaf_mask, .req_valid, .req,
    .ts, .ts_valid, .state_o(ts_state));

  logic            run_req;
  logic [NPART-1:0] member, acc, validated;
  assign run_req = req_valid && ts_valid;
  assign member  = (32'(req.leaf) < NLEAF) ? cfg_assign[req.leaf] : '0;

  for (genvar p = 0; p < int'(NPART); p++) begin : g_part
    logic [8:0]  mult;
    logic [31:0] nmet;
    tp_partition u_part (
      .clk, .rst_n, .now_ts(ts), .req_valid(run_req), .req_ts(req.ts), .member(member[p]),
      .cfg_mult_win(cfg_mult_win[p]), .cfg_threshold(cfg_threshold[p]),
      .cfg_acc_width(cfg_acc_width[p]), .cfg_coinc_delay(cfg_coinc_delay[p]),
      .cfg_coinc_width(cfg_coinc_width[p]), .multiplicity(mult), .acc(acc[p]),
      .coinc(coinc[p]), .n_met(nmet));
  end

  tp_logic_equation #(.NPART(NPART)) u_le (
    .clk, .rst_n, .coinc, .cfg_table(cfg_le_table), .met(le_met));

  // acceptance windows that have already produced a validation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      validated <= '0; n_late <= '0;
    end else begin
      for (int p = 0; p < int'(NPART); p++)
        if (!acc[p]) validated[p] <= 1'b0;
        else if (le_met) validated[p] <= 1'b1;
      if (run_req && |(member & acc & validated)) n_late <= n_late + 1'b1;
    end
  end

  logic [31:0] n_drop;
  tp_fifo_event #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .now_ts(ts), .cfg_timeout, .req_valid(run_req), .req,
    .req_late(|(member & acc & validated)), .le_met, .rep_valid, .rep_ready, .rep,
    .n_accepted, .n_rejected, .n_dropped(n_drop));
endmodule
