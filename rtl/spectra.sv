// spectra: energy spectrum accumulation for every channel.
// Each channel's energy (e_valid/energy from the datapaths) is binned as energy >> cfg_shift
// into one of BINS bins; energies above the last bin count in an overflow counter. All
// channels share one CH*BINS-entry memory of CNT_W-bit counters, updated by one
// read-modify-write per clock: a channel's energy waits in a one-entry holding register
// and the lowest channel with a waiting energy is served first; an energy that finds its
// channel's register still full is counted as dropped. clear zeroes the memory, one entry
// per clock (busy meanwhile, energies dropped). A request (req, req_ch) sends that channel's
// spectrum on a 64-bit valid/ready stream: a word {8'h00, ch, 16'(BINS), 32'h0}, then two
// counters per word (lower bin in bits 31:0), out_last on the final word. Accumulation
// pauses, keeping what is held, during a readout. The document gives the function
// (accumulate since a user reset, read one spectrum in one packet); the bin count, counter
// width and arbitration are this design's own choice.
module spectra #(
  parameter int unsigned CH    = 38,
  parameter int unsigned BINS  = 4096,
  parameter int unsigned CNT_W = 32,
  parameter int unsigned E_W   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [CH-1:0]            e_valid,
  input  logic [CH-1:0][E_W-1:0]   energy,
  input  logic [3:0]               cfg_shift,
  input  logic                     clear,
  input  logic                     req,
  input  logic [7:0]               req_ch,
  output logic                     busy,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [63:0]              out_data,
  output logic                     out_last,
  output logic [31:0]              n_overflow,
  output logic [31:0]              n_dropped
);
  localparam int unsigned BA = $clog2(BINS);
  localparam int unsigned CA = (CH > 1) ? $clog2(CH) : 1;
  localparam int unsigned AA = CA + BA;

  logic [CNT_W-1:0]        mem [CH * BINS];
  logic [CH-1:0]           pend;
  logic [CH-1:0][E_W-1:0]  pend_e;
  logic                    clr_on, rd_on, hdr;
  logic [AA-1:0]           clr_a;
  logic [CA-1:0]           rd_ch;
  logic [BA-1:0]           rd_b;

  // pick the lowest waiting channel
  logic          sel_v;
  logic [CA-1:0] sel;
  logic [E_W-1:0] sel_bin;
  always_comb begin
    sel_v = 1'b0; sel = '0;
    for (int c = int'(CH) - 1; c >= 0; c--) if (pend[c]) begin sel_v = 1'b1; sel = CA'(c); end
    sel_bin = pend_e[sel] >> cfg_shift;
  end
  logic do_acc, in_range;
  logic [AA-1:0] acc_a;
  assign in_range = 32'(sel_bin) < BINS;
  assign do_acc   = sel_v && !clr_on && !rd_on;
  assign acc_a    = AA'(32'(sel) * BINS + 32'(sel_bin[BA-1:0]));

  // energies lost because the channel still waits or the memory is being cleared
  logic [CH-1:0] drop;
  always_comb
    for (int c = 0; c < int'(CH); c++)
      drop[c] = e_valid[c] && (clr_on || (pend[c] && !(do_acc && sel == CA'(c))));

  always_ff @(posedge clk) begin
    if (clr_on) mem[clr_a] <= '0;
    else if (do_acc && in_range && mem[acc_a] != '1) mem[acc_a] <= mem[acc_a] + 1'b1;
  end

  assign busy      = clr_on || rd_on;
  assign out_valid = rd_on;
  always_comb begin
    if (hdr) out_data = {8'h00, 8'(rd_ch), 16'(BINS), 32'h0};
    else     out_data = {32'(mem[AA'(32'(rd_ch) * BINS + 32'(rd_b) + 1)]),
                         32'(mem[AA'(32'(rd_ch) * BINS + 32'(rd_b))])};
  end
  assign out_last = rd_on && !hdr && (32'(rd_b) == BINS - 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0; pend_e <= '0; clr_on <= 1'b1; clr_a <= '0; rd_on <= 1'b0; hdr <= 1'b0;
      rd_ch <= '0; rd_b <= '0; n_overflow <= '0; n_dropped <= '0;
    end else begin
      if (do_acc) begin
        pend[sel] <= 1'b0;
        if (!in_range) n_overflow <= n_overflow + 1'b1;
      end
      for (int c = 0; c < int'(CH); c++)
        if (e_valid[c] && !drop[c]) begin pend[c] <= 1'b1; pend_e[c] <= energy[c]; end
      n_dropped <= n_dropped + 32'($countones(drop));
      if (clear && !clr_on) begin
        clr_on <= 1'b1; clr_a <= '0;
      end else if (clr_on) begin
        if (32'(clr_a) == CH * BINS - 1) clr_on <= 1'b0;
        clr_a <= clr_a + 1'b1;
      end
      if (req && !rd_on && !clr_on && 32'(req_ch) < CH) begin
        rd_on <= 1'b1; hdr <= 1'b1; rd_ch <= CA'(req_ch); rd_b <= '0;
      end else if (rd_on && out_ready) begin
        if (hdr) hdr <= 1'b0;
        else if (out_last) rd_on <= 1'b0;
        else rd_b <= rd_b + BA'(2);
      end
    end
  end
endmodule
