// adc_source: behavioural model, for testbenches, of the digitiser side of the pre-processing
// board as the firmware sees it after the high-speed links: LINES aggregated lines, each
// carrying four 16-bit channels in turn (channel 4*line + k in clock k) with a mark on
// channel 4*line, one new sample per channel every four clocks. Every channel sits on
// BASE and holds an exponential tail with decay time TAU samples; pulse(c, a) adds a step of
// height a to channel c at its next sample, like a preamplifier signal. Channels beyond CH
// read zero. n counts the samples sent.
module adc_source #(
  parameter int LINES = 10,
  parameter int CH    = 38,
  parameter int BASE  = 1000,
  parameter real TAU  = 5000.0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic [LINES-1:0]       agg_valid,
  output logic [LINES-1:0][15:0] agg_data,
  output logic [LINES-1:0]       agg_mark
);
  real tail [CH];
  real pend [CH];
  logic [15:0] val [4 * LINES];
  int k = 0;
  longint n = 0;

  initial begin
    for (int c = 0; c < CH; c++) begin tail[c] = 0.0; pend[c] = 0.0; end
    for (int c = 0; c < 4 * LINES; c++) val[c] = (c < CH) ? 16'(BASE) : 16'h0;
    agg_valid = '0; agg_data = '0; agg_mark = '0;
  end
  task automatic pulse(input int c, input int a);
    pend[c] += real'(a);
  endtask
  always @(negedge clk) begin
    if (k == 0) begin
      for (int c = 0; c < CH; c++) begin
        tail[c] = tail[c] * (1.0 - 1.0 / TAU) + pend[c];
        pend[c] = 0.0;
        val[c]  = 16'(BASE + int'(tail[c]));
      end
      n++;
    end
    for (int l = 0; l < LINES; l++) begin
      agg_valid[l] = rst_n;
      agg_data[l]  = val[4 * l + k];
      agg_mark[l]  = (k == 0);
    end
    k = (k + 1) % 4;
  end
endmodule
