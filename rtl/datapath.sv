// datapath: the process module of one ADC channel, identical for core and segment channels.
// It runs the digital CFD / leading-edge discriminator (dcfd) and the MWD trapezoidal filter
// (mwd_energy) side by side on the same sample stream, at one sample per smp_en strobe of the
// 100 MHz system clock. The local discriminator trigger (trig, fine) goes out to the leaf and
// event logic; the energy capture is started by evt_trig, the accepted event trigger, so that
// every channel of an event reports an energy (the document calculates the energy of all
// channels on a trigger). The channel structure follows the document; the split of the
// trigger input from the local discriminator output is this design's choice.
module datapath #(
  parameter int unsigned W      = 16,
  parameter int unsigned MAX_M  = 2000,
  parameter int unsigned MAX_L  = 2000,
  parameter int unsigned MAX_D  = 16,
  parameter int unsigned MAX_DF = 16,
  parameter int unsigned E_W    = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         smp_en,
  input  logic [W-1:0]                 x,
  // discriminator configuration
  input  logic                         cfg_le_mode,
  input  logic [W-1:0]                 cfg_threshold,
  input  logic [$clog2(MAX_D+1)-1:0]   cfg_delay,
  input  logic [$clog2(MAX_DF+1)-1:0]  cfg_diff,
  input  logic [7:0]                   cfg_frac,
  // energy filter configuration
  input  logic [W-1:0]                 cfg_baseline,
  input  logic [$clog2(MAX_M+1)-1:0]   cfg_m,
  input  logic [$clog2(MAX_L+1)-1:0]   cfg_l,
  input  logic [23:0]                  cfg_k,
  input  logic [$clog2(MAX_M+1)-1:0]   cfg_peak,
  input  logic [5:0]                   cfg_shift,
  input  logic                         evt_trig,
  output logic                         trig,
  output logic [7:0]                   fine,
  output logic signed [W+1:0]          cfd_out,
  output logic signed [47:0]           trap,
  output logic                         e_valid,
  output logic [E_W-1:0]               energy
);
  dcfd #(.W(W), .MAX_D(MAX_D), .MAX_DF(MAX_DF)) u_dcfd (
    .clk, .rst_n, .smp_en, .x, .cfg_le_mode, .cfg_threshold, .cfg_delay, .cfg_diff, .cfg_frac,
    .trig, .fine, .cfd_out);
  mwd_energy #(.W(W), .MAX_M(MAX_M), .MAX_L(MAX_L), .E_W(E_W)) u_mwd (
    .clk, .rst_n, .smp_en, .x, .cfg_baseline, .cfg_m, .cfg_l, .cfg_k, .cfg_peak, .cfg_shift,
    .trig(evt_trig), .trap, .e_valid, .energy);
endmodule
