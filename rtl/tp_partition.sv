// tp_partition: one of the eight partitions of the GTS trigger processor: multiplicity
// filter, threshold, acceptance window and coincidence window.
// member tells whether the leaf of the current request (req_valid, req_ts) is assigned to
// this partition. A member request opens a multiplicity window of cfg_mult_win ticks at its
// timestamp (or counts in the one already open); when the count reaches cfg_threshold the
// threshold condition is met: an acceptance window opens for cfg_acc_width ticks of the
// reference time now_ts, and a coincidence window is scheduled to open cfg_coinc_delay ticks
// later for cfg_coinc_width ticks. coinc is high while the coincidence window is open and
// acc while the acceptance window is. Requests of a window that never reaches the threshold
// are left to time out (rejected) in the event FIFO. Windows are in 10 ns timestamp ticks.
// The sequence multiplicity -> threshold -> acceptance -> coincidence, and the user-set
// width and delay, follow the document; counting by a window opened at the first request is
// this design's choice.
// Timing: at most one request per clock; all windows are measured against the reference time
// now_ts and checked every clock.
module tp_partition
  import agata_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ts_t          now_ts,
  input  logic         req_valid,
  input  ts_t          req_ts,
  input  logic         member,
  input  logic [15:0]  cfg_mult_win,
  input  logic [8:0]   cfg_threshold,
  input  logic [15:0]  cfg_acc_width,
  input  logic [15:0]  cfg_coinc_delay,
  input  logic [15:0]  cfg_coinc_width,
  output logic [8:0]   multiplicity,
  output logic         acc,
  output logic         coinc,
  output logic [31:0]  n_met
);
  logic  win_open, met_pending;
  ts_t   win_start, acc_end, c_start, c_end;
  logic  in_win;
  assign in_win = win_open && (req_ts - win_start) < ts_t'(cfg_mult_win);
  assign acc    = (now_ts < acc_end);
  assign coinc  = (now_ts >= c_start) && (now_ts < c_end);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_open <= 1'b0; win_start <= '0; multiplicity <= '0; met_pending <= 1'b0;
      acc_end <= '0; c_start <= '0; c_end <= '0; n_met <= '0;
    end else begin
      met_pending <= 1'b0;
      if (req_valid && member) begin
        if (in_win) begin
          multiplicity <= multiplicity + 1'b1;
          if (multiplicity + 9'd1 == cfg_threshold) met_pending <= 1'b1;
        end else begin
          win_open     <= 1'b1;
          win_start    <= req_ts;
          multiplicity <= 9'd1;
          if (cfg_threshold <= 9'd1) met_pending <= 1'b1;
        end
      end
      if (met_pending) begin
        acc_end <= now_ts + ts_t'(cfg_acc_width);
        c_start <= now_ts + ts_t'(cfg_coinc_delay);
        c_end   <= now_ts + ts_t'(cfg_coinc_delay) + ts_t'(cfg_coinc_width);
        n_met   <= n_met + 1'b1;
      end
    end
  end
endmodule
