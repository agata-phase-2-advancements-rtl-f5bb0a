// monitor: capture memory for internal signals selected by slow control.
// After arm, the next cfg_len samples (a multiple of 4, at most DEPTH) of the selected
// 16-bit signal (in_valid/in_data; the choice of channel and signal is made by the caller)
// are stored, four per 64-bit word. The capture is then sent on a 64-bit valid/ready stream
// as a sequence of packets of at most PKT_SAMPLES samples each (the multiple-packet
// readout): every packet starts with {8'h00, 8'h00, pkt_index[15:0], pkt_count[15:0],
// samples_in_packet[15:0]} and ends with out_last. busy is high from arm until the last
// packet has left. The document names the function (store the selected internal data and
// send it in several packets); depth, packet size and layout are this design's own choice.
// Timing: one sample stored per in_valid during capture; one word per clock sent while
// out_ready is high.
module monitor #(
  parameter int unsigned DEPTH       = 16384,
  parameter int unsigned PKT_SAMPLES = 4096
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         arm,
  input  logic [15:0]  cfg_len,
  input  logic         in_valid,
  input  logic [15:0]  in_data,
  output logic         busy,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [63:0]  out_data,
  output logic         out_last
);
  localparam int unsigned NW = DEPTH / 4;
  localparam int unsigned WA = $clog2(NW);
  localparam int unsigned PW = PKT_SAMPLES / 4;

  typedef enum logic [1:0] {M_IDLE, M_CAPT, M_HDR, M_DATA} mstate_t;
  mstate_t      state;
  logic [63:0]  mem [NW];
  logic [47:0]  asmb;
  logic [1:0]   k;
  logic [WA:0]  wa, nwords, ra;
  logic [15:0]  pkt, npkt, pkt_left;

  always_ff @(posedge clk) begin
    if (state == M_CAPT && in_valid && k == 2'd3) mem[wa[WA-1:0]] <= {in_data, asmb};
  end

  logic [WA:0] words_left;
  assign words_left = nwords - ra;

  always_comb begin
    out_valid = (state == M_HDR) || (state == M_DATA);
    out_last  = 1'b0;
    out_data  = mem[ra[WA-1:0]];
    if (state == M_HDR) begin
      out_data = {16'h0, pkt, npkt,
                  16'((32'(words_left) > PW) ? PKT_SAMPLES : 32'(words_left) * 4)};
    end else if (state == M_DATA) begin
      out_last = (pkt_left == 16'd1);
    end
  end
  assign busy = state != M_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE; asmb <= '0; k <= '0; wa <= '0; nwords <= '0; ra <= '0;
      pkt <= '0; npkt <= '0; pkt_left <= '0;
    end else begin
      unique case (state)
        M_IDLE: if (arm && cfg_len >= 16'd4 && 32'(cfg_len) <= DEPTH) begin
          state  <= M_CAPT; k <= '0; wa <= '0;
          nwords <= (WA+1)'(cfg_len >> 2);
          npkt   <= 16'((32'(cfg_len >> 2) + PW - 1) / PW);
        end
        M_CAPT: if (in_valid) begin
          if (k != 2'd3) asmb[16*k +: 16] <= in_data;
          k <= k + 1'b1;
          if (k == 2'd3) begin
            wa <= wa + 1'b1;
            if (wa + 1'b1 == nwords) begin
              state <= M_HDR; ra <= '0; pkt <= '0;
            end
          end
        end
        M_HDR: if (out_ready) begin
          state    <= M_DATA;
          pkt_left <= 16'((32'(words_left) > PW) ? PW : 32'(words_left));
        end
        M_DATA: if (out_ready) begin
          ra <= ra + 1'b1;
          pkt_left <= pkt_left - 1'b1;
          if (pkt_left == 16'd1) begin
            pkt <= pkt + 1'b1;
            state <= (ra + 1'b1 == nwords) ? M_IDLE : M_HDR;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
