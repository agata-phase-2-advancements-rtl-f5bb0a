// frame_store: memory interface that keeps every frame sent by a STARE lane until it may be
// needed again, so that single frames can be read back for re-transmission (selective
// repeat). The frame with sequence number s is written, as it passes, into slot
// s mod WINDOW (each slot holds one packet of up to PKT_WORDS 64-bit words) together with
// its length and sequence number. A read request (rd_req with rd_seq, accepted with
// rd_req_ready) streams that slot back on a 64-bit valid/ready output with its length,
// sequence number and last flag. The document keeps these frames in external memory on
// the board; this design holds them on chip, sized by WINDOW (the number of frames that may
// be unacknowledged) and the 8 kB packet size.
// Timing: a frame is written as it passes, one word per clock; a read-back gives one word per
// clock while out_ready is high.
module frame_store #(
  parameter int unsigned WINDOW    = 16,
  parameter int unsigned PKT_WORDS = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  input  logic [63:0]  wr_data,
  input  logic         wr_last,
  input  logic [15:0]  wr_len,
  input  logic [31:0]  wr_seq,
  input  logic         rd_req,
  output logic         rd_req_ready,
  input  logic [31:0]  rd_seq,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [63:0]  out_data,
  output logic         out_last,
  output logic [15:0]  out_len,
  output logic [31:0]  out_seq
);
  localparam int unsigned SA = $clog2(WINDOW);
  localparam int unsigned WA = $clog2(PKT_WORDS);
  logic [63:0]  mem  [WINDOW * PKT_WORDS];
  logic [15:0]  slen [WINDOW];
  logic [31:0]  sseq [WINDOW];
  logic [WA:0]  wa, ra;
  logic [SA-1:0] ws, rs;
  logic         rd_on;

  assign ws = wr_seq[SA-1:0];
  always_ff @(posedge clk) begin
    if (wr_valid && 32'(wa) < PKT_WORDS) mem[{ws, wa[WA-1:0]}] <= wr_data;
  end

  assign rd_req_ready = !rd_on;
  assign out_valid    = rd_on;
  assign out_data     = mem[{rs, ra[WA-1:0]}];
  assign out_len      = slen[rs];
  assign out_seq      = sseq[rs];
  assign out_last     = rd_on && (16'(ra) + 16'd1 >= slen[rs]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0; ra <= '0; rs <= '0; rd_on <= 1'b0;
      for (int s = 0; s < int'(WINDOW); s++) begin slen[s] <= '0; sseq[s] <= '0; end
    end else begin
      if (wr_valid) begin
        if (wr_last) begin
          wa <= '0;
          slen[ws] <= wr_len;
          sseq[ws] <= wr_seq;
        end else wa <= wa + 1'b1;
      end
      if (rd_req && !rd_on) begin
        rd_on <= 1'b1; rs <= rd_seq[SA-1:0]; ra <= '0;
      end else if (rd_on && out_ready) begin
        if (out_last) rd_on <= 1'b0;
        else ra <= ra + 1'b1;
      end
    end
  end
endmodule
