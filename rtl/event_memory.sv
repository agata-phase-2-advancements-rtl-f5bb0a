// event_memory: the event module of the pre-processing firmware.
// SLOTS event slots (eight in the document) keep each triggered event through the GTS
// request / validation / rejection / time-out cycle. On an accepted trigger (evt_trig) a free
// slot takes the timestamp and CFD fine time and, from the next sample strobe, records
// NSAMP samples of every channel, starting cfg_pre samples before that strobe (a pre-trigger
// delay line holds up to MAX_PRE samples). NSAMP is SAMPLES (100) or, with cfg_long,
// LONG_SAMPLES (200). The energies of all channels, which arrive later from the datapaths,
// are stored with it. A GTS validation for the slot's timestamp makes the event readable;
// a rejection, or no answer within cfg_timeout samples, frees the slot.
// Readable events are sent, lowest slot first, on a 64-bit valid/ready stream:
//   word 0            {ts[47:0], fine[7:0], NSAMP[7:0]}
//   ceil(CH/4) words  energies, channel c in word 1+c/4, bits 16*(c%4) +: 16
//   CH*NSAMP/4 words  traces, channel by channel, four samples per word, first in bits 15:0
// with out_last on the final word; the readout engine adds the packet header.
// mem_full tells the leaf to inhibit triggers while no slot is free or a capture is running.
// Slot count, 100/200 samples and the delete-on-reject/time-out behaviour follow the
// document; the word layout and the one-capture-at-a-time rule are this design's choice.
module event_memory
  import agata_pkg::*;
#(
  parameter int unsigned CH           = 38,
  parameter int unsigned SLOTS        = 8,
  parameter int unsigned SAMPLES      = 100,
  parameter int unsigned LONG_SAMPLES = 200,
  parameter int unsigned MAX_PRE      = 64,
  parameter int unsigned E_W          = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         smp_en,
  input  logic [CH-1:0][15:0]          samples,
  input  ts_t                          now_ts,
  input  logic                         cfg_long,
  input  logic [$clog2(MAX_PRE)-1:0]   cfg_pre,
  input  logic [31:0]                  cfg_timeout,
  input  logic                         evt_trig,
  input  ts_t                          evt_ts,
  input  logic [7:0]                   evt_fine,
  input  logic [CH-1:0]                e_valid,
  input  logic [CH-1:0][E_W-1:0]       energy,
  input  logic                         val_valid,
  input  ts_t                          val_ts,
  input  logic                         val_accept,
  output logic                         mem_full,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [63:0]                  out_data,
  output logic                         out_last,
  output logic [31:0]                  n_events,
  output logic [31:0]                  n_readout,
  output logic [31:0]                  n_rejected,
  output logic [31:0]                  n_timeouts
);
  localparam int unsigned MAXW = (LONG_SAMPLES + 3) / 4;
  localparam int unsigned EW   = (CH + 3) / 4;
  localparam int unsigned SA   = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned PA   = $clog2(MAX_PRE);
  localparam int unsigned TA   = $clog2(SLOTS * MAXW);
  localparam int unsigned CA   = (CH > 1) ? $clog2(CH) : 1;

  typedef enum logic [1:0] {S_FREE, S_BUSY, S_READ} slot_state_t;
  slot_state_t           st      [SLOTS];
  ts_t                   s_ts    [SLOTS];
  logic [7:0]            s_fine  [SLOTS];
  logic [SLOTS-1:0]      s_valid, s_capt;
  logic [E_W-1:0]        s_en    [SLOTS][CH];
  logic [63:0]           tmem    [CH][SLOTS*MAXW];
  logic [CH-1:0][15:0]   pre     [MAX_PRE];
  logic [PA-1:0]         pwp;

  // capture
  logic                  cap_on, en_wait;
  logic [SA-1:0]         cap_slot;
  logic [7:0]            cap_n;
  logic [CH-1:0]         en_seen;
  logic [CH-1:0][63:0]   asmb;
  logic [CH-1:0][15:0]   dly;
  logic [7:0]            nsamp;
  logic [TA-1:0]         cap_addr;

  // free-slot search
  logic                  have_free;
  logic [SA-1:0]         free_slot;
  logic                  have_rdy;
  logic [SA-1:0]         rdy_slot;

  assign nsamp = cfg_long ? 8'(LONG_SAMPLES) : 8'(SAMPLES);
  assign dly   = (cfg_pre == '0) ? samples : pre[pwp - cfg_pre];
  assign cap_addr = TA'(32'(cap_slot) * MAXW + 32'(cap_n >> 2));

  always_comb begin
    have_free = 1'b0; free_slot = '0; have_rdy = 1'b0; rdy_slot = '0;
    for (int s = int'(SLOTS) - 1; s >= 0; s--) begin
      if (st[s] == S_FREE) begin have_free = 1'b1; free_slot = SA'(s); end
      if (st[s] == S_BUSY && s_valid[s] && s_capt[s]) begin have_rdy = 1'b1; rdy_slot = SA'(s); end
    end
  end
  assign mem_full = !have_free || cap_on || en_wait;

  // readout
  logic               rd_on;
  logic [SA-1:0]      rd_slot;
  logic [1:0]         rd_ph;        // 0 header, 1 energies, 2 traces
  logic [CA-1:0]      rd_ch;
  logic [7:0]         rd_w;
  logic               rd_last;

  always_comb begin
    out_data = '0;
    rd_last  = 1'b0;
    unique case (rd_ph)
      2'd0: out_data = {s_ts[rd_slot], s_fine[rd_slot], nsamp};
      2'd1: for (int k = 0; k < 4; k++)
              if (32'(rd_w) * 4 + k < CH)
                out_data[16*k +: 16] = 16'(s_en[rd_slot][32'(rd_w) * 4 + k]);
      default: begin
        out_data = tmem[rd_ch][32'(rd_slot) * MAXW + 32'(rd_w)];
        rd_last  = (32'(rd_ch) == CH - 1) && (rd_w == (nsamp >> 2) - 8'd1);
      end
    endcase
  end
  assign out_valid = rd_on;
  assign out_last  = rd_on && rd_last;

  // trace memory writes: four samples collected per channel, then one word per channel
  always_ff @(posedge clk) begin
    if (smp_en && cap_on && cap_n[1:0] == 2'd3)
      for (int c = 0; c < int'(CH); c++) tmem[c][cap_addr] <= {dly[c], asmb[c][63:16]};
    if (smp_en) pre[pwp] <= samples;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SLOTS); s++) begin
        st[s] <= S_FREE; s_ts[s] <= '0; s_fine[s] <= '0;
        for (int c = 0; c < int'(CH); c++) s_en[s][c] <= '0;
      end
      s_valid <= '0; s_capt <= '0; pwp <= '0;
      cap_on <= 1'b0; en_wait <= 1'b0; cap_slot <= '0; cap_n <= '0; en_seen <= '0; asmb <= '0;
      rd_on <= 1'b0; rd_slot <= '0; rd_ph <= '0; rd_ch <= '0; rd_w <= '0;
      n_events <= '0; n_readout <= '0; n_rejected <= '0; n_timeouts <= '0;
    end else begin
      if (smp_en) pwp <= pwp + 1'b1;

      // time-out of events still waiting for the GTS answer
      for (int s = 0; s < int'(SLOTS); s++)
        if (st[s] == S_BUSY && !s_valid[s] && (now_ts - s_ts[s]) > 48'(cfg_timeout)
            && !(cap_on && cap_slot == SA'(s))) begin
          st[s] <= S_FREE;
          n_timeouts <= n_timeouts + 1'b1;
        end

      // GTS validation / rejection
      if (val_valid)
        for (int s = 0; s < int'(SLOTS); s++)
          if (st[s] == S_BUSY && !s_valid[s] && s_ts[s] == val_ts) begin
            if (val_accept) s_valid[s] <= 1'b1;
            else begin
              st[s] <= S_FREE;
              n_rejected <= n_rejected + 1'b1;
            end
          end

      // capture
      if (evt_trig && !mem_full) begin
        st[free_slot]      <= S_BUSY;
        s_ts[free_slot]    <= evt_ts;
        s_fine[free_slot]  <= evt_fine;
        s_valid[free_slot] <= 1'b0;
        s_capt[free_slot]  <= 1'b0;
        cap_slot <= free_slot;
        cap_on   <= 1'b1;
        en_wait  <= 1'b1;
        en_seen  <= '0;
        cap_n    <= '0;
        n_events <= n_events + 1'b1;
      end
      if (smp_en && cap_on) begin
        for (int c = 0; c < int'(CH); c++) asmb[c] <= {dly[c], asmb[c][63:16]};
        cap_n <= cap_n + 1'b1;
        if (cap_n == nsamp - 8'd1) cap_on <= 1'b0;
      end
      if (en_wait) begin
        for (int c = 0; c < int'(CH); c++)
          if (e_valid[c]) begin
            s_en[cap_slot][c] <= energy[c];
            en_seen[c] <= 1'b1;
          end
        if (&(en_seen | e_valid)) en_wait <= 1'b0;
      end
      if (!cap_on && !en_wait && st[cap_slot] == S_BUSY) s_capt[cap_slot] <= 1'b1;

      // readout
      if (!rd_on && have_rdy) begin
        rd_on <= 1'b1; rd_slot <= rdy_slot; rd_ph <= 2'd0; rd_ch <= '0; rd_w <= '0;
        st[rdy_slot] <= S_READ;
      end else if (rd_on && out_ready) begin
        unique case (rd_ph)
          2'd0: begin rd_ph <= 2'd1; rd_w <= '0; end
          2'd1: if (32'(rd_w) == EW - 1) begin rd_ph <= 2'd2; rd_w <= '0; end
                else rd_w <= rd_w + 1'b1;
          default:
            if (rd_last) begin
              rd_on <= 1'b0;
              st[rd_slot] <= S_FREE;
              n_readout <= n_readout + 1'b1;
            end else if (rd_w == (nsamp >> 2) - 8'd1) begin
              rd_w <= '0; rd_ch <= rd_ch + 1'b1;
            end else rd_w <= rd_w + 1'b1;
        endcase
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid);
endmodule
