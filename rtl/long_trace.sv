// long_trace: the long trace module. Every sample strobe it writes the samples of all CH
// channels into a circular buffer of DEPTH samples per channel (4000 samples, about 40 us, in
// the document), so the most recent DEPTH samples of every channel are always available.
// A request (req with req_ch and req_len, 1..DEPTH) freezes the buffer and sends the last
// req_len samples of channel req_ch, oldest first, as one packet on a 64-bit valid/ready
// stream: a first word {8'h00, ch[7:0], len[15:0], 32'h0} and then four samples per word,
// first sample in bits 15:0, with out_last on the final word. Recording resumes when the
// packet is sent; busy is high meanwhile. One sample is read per clock, so a word leaves at
// most every fourth clock. Depth and the one-packet readout follow the document; the
// per-request channel choice and the word layout are this design's own.
module long_trace #(
  parameter int unsigned CH    = 38,
  parameter int unsigned DEPTH = 4000
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        smp_en,
  input  logic [CH-1:0][15:0]         samples,
  input  logic                        req,
  input  logic [7:0]                  req_ch,
  input  logic [15:0]                 req_len,
  output logic                        busy,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [63:0]                 out_data,
  output logic                        out_last
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [15:0]    mem [CH][DEPTH];
  logic [AW-1:0]  wp, rp;
  localparam int unsigned CA = (CH > 1) ? $clog2(CH) : 1;
  logic [CA-1:0]  ch;
  logic [15:0]    left;
  logic           filling;
  logic [1:0]     k;
  logic [47:0]    word;

  always_ff @(posedge clk) begin
    if (smp_en && !busy)
      for (int c = 0; c < int'(CH); c++) mem[c][wp] <= samples[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; ch <= '0; left <= '0; busy <= 1'b0;
      filling <= 1'b0; k <= '0; word <= '0; out_valid <= 1'b0;
      out_data <= '0; out_last <= 1'b0;
    end else begin
      if (smp_en && !busy) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (!busy && req && req_len != 0 && 32'(req_len) <= DEPTH && 32'(req_ch) < CH) begin
        busy <= 1'b1;
        ch   <= CA'(req_ch);
        left <= req_len;
        rp   <= (32'(wp) >= 32'(req_len)) ? AW'(32'(wp) - 32'(req_len))
                                          : AW'(32'(wp) + DEPTH - 32'(req_len));
        out_valid <= 1'b1;
        out_data  <= {8'h00, req_ch, req_len, 32'h0};
        out_last  <= 1'b0;
        filling   <= 1'b0;
        k <= '0;
      end else if (busy) begin
        if (out_valid && out_ready) begin
          out_valid <= 1'b0;
          if (out_last) busy <= 1'b0;
          else filling <= 1'b1;
        end
        if (filling && !out_valid) begin
          // gather one sample per clock, pad the last word with zeros
          if (k != 2'd3) word[16*k +: 16] <= (left != 0) ? mem[ch][rp] : 16'h0;
          if (left != 0) begin
            left <= left - 1'b1;
            rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
          end
          k <= k + 1'b1;
          if (k == 2'd3) begin
            filling   <= 1'b0;
            out_valid <= 1'b1;
            out_data  <= {(left != 0) ? mem[ch][rp] : 16'h0, word[47:0]};
            out_last  <= (left <= 16'd1);
          end
        end
      end
    end
  end
endmodule
