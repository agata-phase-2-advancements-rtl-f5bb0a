// tdm_deagg: receiver half of the 4-to-1 time-domain-multiplexing link aggregation.
// Four 2 Gbps digitiser links are interleaved word by word onto one faster line; this block
// splits that line back into the original links. A line mark flags the word that belongs to
// link 0 of each group (the "line marks" control of the aggregator). The block locks on the
// first mark, fills one word per link, and presents the LANES words of a group together with
// a one-cycle out_valid, which the rest of the firmware uses as its sample strobe. A mark at
// the wrong position or a missing mark counts an alignment error and relocks on the next mark.
// Aggregation ratio 4 follows the document; the word-wise interleave and mark encoding are
// this design's own choice. Latency: out_valid one cycle after the last word of a group.
module tdm_deagg #(
  parameter int unsigned LANES = 4,
  parameter int unsigned W     = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [W-1:0]              in_data,
  input  logic                      in_mark,
  output logic                      out_valid,
  output logic [LANES-1:0][W-1:0]   out_data,
  output logic                      locked,
  output logic [15:0]               align_errors
);
  localparam int unsigned CW = (LANES > 1) ? $clog2(LANES) : 1;
  logic [CW-1:0]            idx;
  logic [LANES-1:0][W-1:0]  acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; acc <= '0; out_valid <= 1'b0; out_data <= '0;
      locked <= 1'b0; align_errors <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (in_mark) begin
          if (locked && idx != '0) align_errors <= align_errors + 16'd1;
          locked <= 1'b1;
          acc[0] <= in_data;
          idx    <= CW'(1);
          if (LANES == 1) begin
            out_data[0] <= in_data;
            out_valid <= 1'b1;
            idx       <= '0;
          end
        end else if (locked) begin
          if (idx == '0) begin
            // a group must start with a mark
            align_errors <= align_errors + 16'd1;
            locked <= 1'b0;
          end else begin
            if (32'(idx) == LANES - 1) begin
              for (int l = 0; l < int'(LANES) - 1; l++) out_data[l] <= acc[l];
              out_data[LANES-1] <= in_data;
              out_valid <= 1'b1;
              idx <= '0;
            end else begin
              acc[idx] <= in_data;
              idx <= idx + CW'(1);
            end
          end
        end
      end
    end
  end
endmodule
