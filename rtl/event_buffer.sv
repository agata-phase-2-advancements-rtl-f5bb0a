// event_buffer: the double toggle FIFO of STARE's Aurora interface.
// Two buffers of MAX_BYTES alternate: while one is drained towards the package slicer the
// other is filled from the Aurora stream, so the link never waits for the slicer. A buffer
// is closed when it holds cfg_bytes bytes (a multiple of 64, 8 kB by default in the
// document) or when the incoming frame ends (in_last), whichever comes first. A closed
// buffer is sent on the output stream with its word count in out_len (valid with out_valid)
// and out_last on its final word. in_ready is low only while both buffers are closed.
// All streams are 64-bit valid/ready. Double buffering and the size rule follow the
// document; closing on the frame end and the capacity of 16 kB are this design's choice.
// Timing: one word per clock written and one read, on the two buffers at the same time.
module event_buffer #(
  parameter int unsigned MAX_BYTES = 16384
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [15:0]  cfg_bytes,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [63:0]  in_data,
  input  logic         in_last,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [63:0]  out_data,
  output logic         out_last,
  output logic [15:0]  out_len,
  output logic [31:0]  n_toggles
);
  localparam int unsigned NW = MAX_BYTES / 8;
  localparam int unsigned AW = $clog2(NW);
  logic [63:0]  mem [2][NW];
  logic [1:0]   full;
  logic [15:0]  len [2];
  logic         wb, rb;
  logic [AW:0]  wa, ra;
  logic [15:0]  lim;

  assign lim      = (32'(cfg_bytes >> 3) == 0 || 32'(cfg_bytes >> 3) > NW) ? 16'(NW)
                                                                           : (cfg_bytes >> 3);
  assign in_ready = !full[wb];
  assign out_valid = full[rb];
  assign out_data  = mem[rb][ra[AW-1:0]];
  assign out_len   = len[rb];
  assign out_last  = full[rb] && (16'(ra) == len[rb] - 16'd1);

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wb][wa[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; len[0] <= '0; len[1] <= '0; wb <= 1'b0; rb <= 1'b0; wa <= '0; ra <= '0;
      n_toggles <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (in_last || 16'(wa) + 16'd1 == lim) begin
          full[wb] <= 1'b1;
          len[wb]  <= 16'(wa) + 16'd1;
          wb <= !wb;
          wa <= '0;
          n_toggles <= n_toggles + 1'b1;
        end else wa <= wa + 1'b1;
      end
      if (out_valid && out_ready) begin
        if (out_last) begin
          full[rb] <= 1'b0;
          rb <= !rb;
          ra <= '0;
        end else ra <= ra + 1'b1;
      end
    end
  end
endmodule
