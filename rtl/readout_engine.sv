// readout_engine: one of the four readout engines that feed the Aurora links to STARE.
// It reads the memory blocks enabled for it (cfg_enable, one bit per source: event memory,
// long traces, spectra, monitor) and frames each block's packet for the link: a header word
// {type[7:0], ENGINE_ID[7:0], 16'h0, seq[31:0]} followed by the source's words unchanged,
// ending with the source's out_last. Sources are served round robin, one whole packet at a
// time. Without data the engine sends one-word control frames by itself: an IDLE frame after
// cfg_idle_period clocks of silence (0 disables it), a System Off frame instead of IDLE
// while sys_off is high, and an Error frame after each err pulse. seq counts frames.
// All streams are 64-bit valid/ready with a last flag. Selecting sources, ADF framing and
// the IDLE / Error / System Off frames follow the document; the header layout is this
// design's own stand-in for the ADF frame.
module readout_engine
  import agata_pkg::*;
#(
  parameter int unsigned NSRC      = 4,
  parameter logic [7:0]  ENGINE_ID = 8'd0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NSRC-1:0]            src_valid,
  output logic [NSRC-1:0]            src_ready,
  input  logic [NSRC-1:0][63:0]      src_data,
  input  logic [NSRC-1:0]            src_last,
  input  logic [NSRC-1:0][7:0]       src_type,
  input  logic [NSRC-1:0]            cfg_enable,
  input  logic [15:0]                cfg_idle_period,
  input  logic                       sys_off,
  input  logic                       err,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [63:0]                out_data,
  output logic                       out_last,
  output logic [31:0]                n_frames,
  output logic [31:0]                n_idle
);
  localparam int unsigned SA = (NSRC > 1) ? $clog2(NSRC) : 1;
  typedef enum logic [1:0] {E_IDLE, E_HDR, E_PASS, E_CTRL} estate_t;
  estate_t       state;
  logic [SA-1:0] cur, rr;
  logic [7:0]    ctype;
  logic [15:0]   quiet;
  logic          err_pend;

  // round-robin choice starting at rr
  logic          pick_v;
  logic [SA-1:0] pick;
  always_comb begin
    logic [31:0] s;
    pick_v = 1'b0; pick = '0; s = '0;
    for (int i = int'(NSRC) - 1; i >= 0; i--) begin
      s = (32'(rr) + 32'(i)) % NSRC;
      if (src_valid[s] && cfg_enable[s]) begin pick_v = 1'b1; pick = SA'(s); end
    end
  end

  always_comb begin
    out_valid = 1'b0; out_data = '0; out_last = 1'b0; src_ready = '0;
    unique case (state)
      E_HDR:  begin out_valid = 1'b1; out_data = {src_type[cur], ENGINE_ID, 16'h0, n_frames}; end
      E_CTRL: begin out_valid = 1'b1; out_data = {ctype, ENGINE_ID, 16'h0, n_frames}; out_last = 1'b1; end
      E_PASS: begin
        out_valid = src_valid[cur]; out_data = src_data[cur]; out_last = src_last[cur];
        src_ready[cur] = out_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE; cur <= '0; rr <= '0; ctype <= '0; quiet <= '0; err_pend <= 1'b0;
      n_frames <= '0; n_idle <= '0;
    end else begin
      if (err) err_pend <= 1'b1;
      unique case (state)
        E_IDLE: begin
          if (quiet != 16'hFFFF) quiet <= quiet + 1'b1;
          if (err_pend || err) begin
            state <= E_CTRL; ctype <= PKT_ERROR; err_pend <= 1'b0;
          end else if (pick_v) begin
            state <= E_HDR; cur <= pick;
          end else if (cfg_idle_period != 0 && quiet >= cfg_idle_period) begin
            state <= E_CTRL; ctype <= sys_off ? PKT_SYSOFF : PKT_IDLE;
          end
        end
        E_HDR: if (out_ready) state <= E_PASS;
        E_PASS: if (src_valid[cur] && out_ready && src_last[cur]) begin
          state <= E_IDLE; quiet <= '0; n_frames <= n_frames + 1'b1;
          rr <= (32'(cur) == NSRC - 1) ? '0 : cur + 1'b1;
        end
        E_CTRL: if (out_ready) begin
          state <= E_IDLE; quiet <= '0; n_frames <= n_frames + 1'b1;
          if (ctype == PKT_IDLE || ctype == PKT_SYSOFF) n_idle <= n_idle + 1'b1;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
