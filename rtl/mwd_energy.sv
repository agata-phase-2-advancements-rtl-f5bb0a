// mwd_energy: Moving Window Deconvolution trapezoidal filter and energy capture.
// Per sample strobe the baseline-subtracted sample b[n] = x[n] - cfg_baseline feeds
//   MWD[n] = b[n] - b[n-M] + K * sum(b[n-M] .. b[n-1]),   K = cfg_k / 2^24 (1/tau),
// which turns the exponentially decaying pre-amplifier step into a rectangle of length M,
// and the trapezoid T[n] = sum(MWD[n-L+1] .. MWD[n]), a moving sum of length L (rise L,
// flat top M-L+1). M is at most MAX_M samples: 2000 samples = 20 us, the maximum filter
// length in the document. On a capture request (trig) the block waits cfg_peak strobes and
// latches T >>> cfg_shift, clamped to 0 .. 2^E_W-1, as the energy with a one-cycle e_valid.
// The MWD algorithm and its maximum length follow the document; the fixed-point formats,
// the configured baseline and the capture delay are this design's own choice.
// Latency: T[n] is registered in the clock after the strobe of sample n.
module mwd_energy #(
  parameter int unsigned W     = 16,
  parameter int unsigned MAX_M = 2000,
  parameter int unsigned MAX_L = 2000,
  parameter int unsigned E_W   = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        smp_en,
  input  logic [W-1:0]                x,
  input  logic [W-1:0]                cfg_baseline,
  input  logic [$clog2(MAX_M+1)-1:0]  cfg_m,
  input  logic [$clog2(MAX_L+1)-1:0]  cfg_l,
  input  logic [23:0]                 cfg_k,
  input  logic [$clog2(MAX_M+1)-1:0]  cfg_peak,
  input  logic [5:0]                  cfg_shift,
  input  logic                        trig,
  output logic signed [47:0]          trap,
  output logic                        e_valid,
  output logic [E_W-1:0]              energy
);
  localparam int unsigned MA = $clog2(MAX_M);
  localparam int unsigned LA = $clog2(MAX_L);

  logic signed [W:0]   bmem [MAX_M];     // b[] history
  logic signed [47:0]  mmem [MAX_L];     // MWD[] history
  logic [MA-1:0]       bwp, brp;
  logic [LA-1:0]       mwp, mrp;
  logic signed [W:0]   b_now, b_old;
  logic signed [47:0]  acc;              // sum of b over the last M samples
  logic signed [47:0]  mwd_now, m_old;
  logic signed [71:0]  kacc;
  logic                cap_busy;
  logic [$clog2(MAX_M+1)-1:0] cap_cnt;

  assign b_now = (W+1)'($signed({1'b0, x})) - (W+1)'($signed({1'b0, cfg_baseline}));
  always_comb begin
    brp = (32'(bwp) >= 32'(cfg_m)) ? MA'(32'(bwp) - 32'(cfg_m))
                                   : MA'(32'(bwp) + MAX_M - 32'(cfg_m));
    mrp = (32'(mwp) >= 32'(cfg_l)) ? LA'(32'(mwp) - 32'(cfg_l))
                                   : LA'(32'(mwp) + MAX_L - 32'(cfg_l));
  end
  assign b_old   = bmem[brp];
  assign kacc    = 72'(acc) * 72'($signed({1'b0, cfg_k}));
  assign mwd_now = 48'(b_now) - 48'(b_old) + 48'(kacc >>> 24);
  assign m_old   = mmem[mrp];

  always_ff @(posedge clk) begin
    if (smp_en) begin
      bmem[bwp] <= b_now;
      mmem[mwp] <= mwd_now;
    end
  end

  function automatic logic [E_W-1:0] clampe(input logic signed [47:0] v);
    if (v < 0) return '0;
    if (v > 48'($signed({1'b0, {E_W{1'b1}}}))) return '1;
    return v[E_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bwp <= '0; mwp <= '0; acc <= '0; trap <= '0;
      cap_busy <= 1'b0; cap_cnt <= '0; e_valid <= 1'b0; energy <= '0;
    end else begin
      e_valid <= 1'b0;
      if (smp_en) begin
        bwp  <= (32'(bwp) == MAX_M - 1) ? '0 : bwp + MA'(1);
        mwp  <= (32'(mwp) == MAX_L - 1) ? '0 : mwp + LA'(1);
        acc  <= acc + 48'(b_now) - 48'(b_old);
        trap <= trap + mwd_now - m_old;
        if (cap_busy) begin
          if (cap_cnt == '0) begin
            cap_busy <= 1'b0;
            e_valid  <= 1'b1;
            energy   <= clampe(trap >>> cfg_shift);
          end else begin
            cap_cnt <= cap_cnt - 1'b1;
          end
        end
      end
      if (trig && !cap_busy) begin
        cap_busy <= 1'b1;
        cap_cnt  <= cfg_peak;
      end
    end
  end

  // Memories start cleared so that the first M (L) samples see zero history.
  initial begin
    for (int i = 0; i < int'(MAX_M); i++) bmem[i] = '0;
    for (int i = 0; i < int'(MAX_L); i++) mmem[i] = '0;
  end
endmodule
