// dcfd: digital constant fraction discriminator with a leading-edge option and linear
// interpolation of the crossing time inside the 10 ns sample.
// A fast difference d[n] = x[n] - x[n-DIFF] turns the pre-amplifier step into a pulse.
// CFD mode builds c[n] = d[n-D] - f*d[n] (f = cfg_frac/256); once d exceeds the threshold the
// discriminator is armed and fires on the first negative-to-positive crossing of c. LE mode
// fires when d itself crosses the threshold. In both modes the fraction of a sample between
// the two samples around the crossing is obtained by linear interpolation and reported in
// 1/256 of a sample (fine). After firing the discriminator re-arms when d falls back below
// the threshold. The document gives the function (dCFD or LE, threshold, linear
// interpolation); the fast difference, delay range and fixed-point format are this design's.
// The difference span is cfg_diff+1 samples and the CFD delay cfg_delay+1 samples.
// Timing: one result per sample strobe smp_en; trig is a one-cycle pulse in the clock after
// the strobe of the first sample n at or above the crossing level; the crossing time is then
// sample n-1 plus fine/256 of a sample.
module dcfd #(
  parameter int unsigned W      = 16,
  parameter int unsigned MAX_D  = 16,
  parameter int unsigned MAX_DF = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         smp_en,
  input  logic [W-1:0]                 x,
  input  logic                         cfg_le_mode,
  input  logic [W-1:0]                 cfg_threshold,
  input  logic [$clog2(MAX_D+1)-1:0]   cfg_delay,
  input  logic [$clog2(MAX_DF+1)-1:0]  cfg_diff,
  input  logic [7:0]                   cfg_frac,
  output logic                         trig,
  output logic [7:0]                   fine,
  output logic signed [W+1:0]          cfd_out
);
  localparam int unsigned DW = W + 2;   // signed fast difference / CFD width
  logic [W-1:0]              xh [MAX_DF+1];
  logic signed [DW-1:0]      dh [MAX_D+1];
  logic signed [DW-1:0]      d_now, c_now, c_prev, d_prev;
  logic signed [DW+8:0]      fd;
  logic                      armed, hold;
  // the discriminator stays quiet until both delay lines hold real samples
  localparam int unsigned FILL = MAX_DF + MAX_D + 2;
  logic [$clog2(FILL+1)-1:0] fill;
  logic                      primed;
  assign primed = (32'(fill) == FILL);
  logic signed [DW-1:0]      thr;

  assign thr   = DW'($signed({1'b0, cfg_threshold}));
  assign d_now = DW'($signed({1'b0, x})) - DW'($signed({1'b0, xh[cfg_diff]}));
  assign fd    = (DW+9)'(d_now) * (DW+9)'($signed({1'b0, cfg_frac}));
  assign c_now = dh[cfg_delay] - DW'(fd >>> 8);
  assign cfd_out = c_now;

  // Interpolated fraction of a sample: crossing point between previous and current sample.
  function automatic logic [7:0] interp(input logic signed [DW-1:0] a,
                                        input logic signed [DW-1:0] b,
                                        input logic signed [DW-1:0] level);
    logic signed [DW+9:0] num, den, q;
    num = ((DW+10)'(level) - (DW+10)'(a)) <<< 8;
    den = (DW+10)'(b) - (DW+10)'(a);
    if (den <= 0) return 8'd0;
    q = num / den;
    if (q < 0) return 8'd0;
    if (q > 255) return 8'd255;
    return q[7:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= int'(MAX_DF); i++) xh[i] <= '0;
      for (int i = 0; i <= int'(MAX_D); i++)  dh[i] <= '0;
      c_prev <= '0; d_prev <= '0; armed <= 1'b0; hold <= 1'b0; fill <= '0;
      trig <= 1'b0; fine <= '0;
    end else begin
      trig <= 1'b0;
      if (smp_en) begin
        xh[0] <= x;
        for (int i = 1; i <= int'(MAX_DF); i++) xh[i] <= xh[i-1];
        dh[0] <= d_now;
        for (int i = 1; i <= int'(MAX_D); i++) dh[i] <= dh[i-1];
        c_prev <= c_now;
        d_prev <= d_now;
        if (!primed) fill <= fill + 1'b1;
        if (cfg_le_mode) begin
          if (primed && d_prev <= thr && d_now > thr) begin
            trig <= 1'b1;
            fine <= interp(d_prev, d_now, thr);
          end
        end else begin
          if (armed && primed && c_prev < 0 && c_now >= 0) begin
            trig  <= 1'b1;
            fine  <= interp(c_prev, c_now, '0);
            armed <= 1'b0;
            hold  <= 1'b1;
          end else if (primed && !armed && !hold && d_now > thr) begin
            armed <= 1'b1;
          end
        end
        if (d_now <= thr) begin
          armed <= 1'b0;
          hold  <= 1'b0;
        end
      end
    end
  end
endmodule
