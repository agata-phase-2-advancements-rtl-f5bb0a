// package_generator: merges the two packet sources of a STARE lane into the stream for the
// UDP interface: new packets from the package slicer and packets read back from the frame
// store for re-transmission (the RUDP path, used when the server lost a frame).
// Whole packets are switched, never interleaved; between packets a waiting re-transmission
// goes first. Sequence number and length travel with each packet; out_retx marks a
// re-transmitted one. All streams are 64-bit valid/ready with last. The merge of the two
// sources follows the document; the priority rule is this design's choice.
// Timing: one word per clock while out_ready is high; the source is chosen when a packet starts.
module package_generator (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         new_valid,
  output logic         new_ready,
  input  logic [63:0]  new_data,
  input  logic         new_last,
  input  logic [15:0]  new_len,
  input  logic [31:0]  new_seq,
  input  logic         rtx_valid,
  output logic         rtx_ready,
  input  logic [63:0]  rtx_data,
  input  logic         rtx_last,
  input  logic [15:0]  rtx_len,
  input  logic [31:0]  rtx_seq,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [63:0]  out_data,
  output logic         out_last,
  output logic [15:0]  out_len,
  output logic [31:0]  out_seq,
  output logic         out_retx
);
  logic busy, sel;      // sel = 1: re-transmission
  logic cur;
  assign cur = busy ? sel : rtx_valid;

  always_comb begin
    if (cur) begin
      out_valid = rtx_valid; out_data = rtx_data; out_last = rtx_last;
      out_len = rtx_len; out_seq = rtx_seq;
    end else begin
      out_valid = new_valid; out_data = new_data; out_last = new_last;
      out_len = new_len; out_seq = new_seq;
    end
    out_retx  = cur;
    rtx_ready = cur && out_ready;
    new_ready = !cur && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; sel <= 1'b0;
    end else if (out_valid && out_ready) begin
      busy <= !out_last;
      sel  <= cur;
    end
  end
endmodule
