// ts48_reference: the trigger processor's local 48-bit timestamp, one tick per 10 ns clock of
// the 100 MHz GTS clock. A three-state machine (IDLE, LEARNING, PROCESSING) sets its start:
//  - manual mode (cfg_mode = 1): out of reset it goes from IDLE straight to PROCESSING,
//    starting from cfg_delay;
//  - automatic mode (cfg_mode = 0): it goes to LEARNING and watches the trigger requests of
//    the leaves selected in cfg_leaf_mask, remembering each leaf's latest timestamp. When
//    every selected leaf has sent cfg_nb_samples requests (100 in the document) it scans
//    the leaves, one per clock, for the smallest of those timestamps, adds the clocks spent
//    scanning, and enters PROCESSING from there: the reference lags the slowest leaf, so
//    the oldest requests of the whole system can still be collected.
// reset returns it to IDLE. ts_valid is high in PROCESSING. States, modes, cfg_delay and the
// smallest-timestamp rule follow the document; the per-leaf bookkeeping is this design's.
module ts48_reference
  import agata_pkg::*;
#(
  parameter int unsigned NLEAF = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_mode,
  input  ts_t                cfg_delay,
  input  logic [7:0]         cfg_nb_samples,
  input  logic [NLEAF-1:0]   cfg_leaf_mask,
  input  logic               req_valid,
  input  gts_req_t           req,
  output ts_t                ts,
  output logic               ts_valid,
  output logic [1:0]         state_o
);
  typedef enum logic [1:0] {T_IDLE, T_LEARN, T_SCAN, T_PROC} tstate_t;
  localparam int unsigned LA = $clog2(NLEAF);
  tstate_t            state;
  logic [7:0]         cnt  [NLEAF];
  ts_t                last [NLEAF];
  logic [NLEAF-1:0]   done;
  logic [LA:0]        si;
  ts_t                minv;
  logic [LA:0]        elapsed;

  assign ts_valid = (state == T_PROC);
  // report the document's three states: scanning is the end of learning
  assign state_o  = (state == T_SCAN) ? 2'(T_LEARN) : ((state == T_PROC) ? 2'd2 : 2'(state));
  always_comb
    for (int l = 0; l < int'(NLEAF); l++) done[l] = !cfg_leaf_mask[l] || cnt[l] >= cfg_nb_samples;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE; ts <= '0; si <= '0; minv <= '1; elapsed <= '0;
      for (int l = 0; l < int'(NLEAF); l++) begin cnt[l] <= '0; last[l] <= '0; end
    end else begin
      unique case (state)
        T_IDLE: begin
          for (int l = 0; l < int'(NLEAF); l++) cnt[l] <= '0;
          if (cfg_mode) begin state <= T_PROC; ts <= cfg_delay; end
          else state <= T_LEARN;
        end
        T_LEARN: begin
          if (req_valid && 32'(req.leaf) < NLEAF && cfg_leaf_mask[req.leaf]) begin
            last[req.leaf] <= req.ts;
            if (cnt[req.leaf] != 8'hFF) cnt[req.leaf] <= cnt[req.leaf] + 1'b1;
          end
          if (&done && |cfg_leaf_mask) begin
            state <= T_SCAN; si <= '0; minv <= '1; elapsed <= '0;
          end
        end
        T_SCAN: begin
          elapsed <= elapsed + 1'b1;
          if (32'(si) < NLEAF) begin
            if (cfg_leaf_mask[si[LA-1:0]] && last[si[LA-1:0]] < minv) minv <= last[si[LA-1:0]];
            si <= si + 1'b1;
          end else begin
            state <= T_PROC;
            ts    <= minv + ts_t'(elapsed) + 1'b1;
          end
        end
        default: ts <= ts + 1'b1;
      endcase
    end
  end
endmodule
