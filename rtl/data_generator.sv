// data_generator: the counter test generator of a STARE lane. When enabled it sends packets
// of cfg_words 64-bit words (1024 words = 8 kB by default in the document) back to back at
// full speed; the words carry a 64-bit counter that runs on across packets, so a receiver
// can check every word against the previous one and count errors. out_last marks each
// packet end; n_packets counts finished packets. Disabling takes effect at a packet end.
// The three AGATA-event generators of the document are not described there in enough
// detail to build.
// Timing: one 64-bit word per clock while out_ready is high, with no gap inside or between
// packets.
module data_generator (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic [15:0]  cfg_words,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [63:0]  out_data,
  output logic         out_last,
  output logic [31:0]  n_packets
);
  logic [15:0] idx;
  logic        run;
  assign out_valid = run;
  assign out_last  = run && (idx + 16'd1 >= cfg_words);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; run <= 1'b0; out_data <= '0; n_packets <= '0;
    end else begin
      if (!run && enable && cfg_words != 0) run <= 1'b1;
      if (out_valid && out_ready) begin
        out_data <= out_data + 1'b1;
        if (out_last) begin
          idx <= '0;
          n_packets <= n_packets + 1'b1;
          run <= enable;
        end else idx <= idx + 1'b1;
      end
    end
  end
endmodule
