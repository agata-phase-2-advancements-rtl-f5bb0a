// package_slicer: cuts each event buffer coming from the double toggle FIFO into packets of
// at most PKT_BYTES bytes (8192, the jumbo frame size in the document) for the UDP
// interface. Every packet gets the next frame sequence number (out_seq) and its word count
// (out_len); both are valid for the whole packet. Data words pass unchanged on a 64-bit
// valid/ready stream with out_last on each packet's final word. The input gives the buffer
// length with its first word (in_len). Purely combinational on the data path.
// Timing: no added latency; one word per clock.
module package_slicer #(
  parameter int unsigned PKT_BYTES = 8192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [63:0]  in_data,
  input  logic         in_last,
  input  logic [15:0]  in_len,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [63:0]  out_data,
  output logic         out_last,
  output logic [15:0]  out_len,
  output logic [31:0]  out_seq
);
  localparam int unsigned PW = PKT_BYTES / 8;
  logic [15:0] done;     // words of the buffer already sent
  logic [15:0] in_pkt;   // words of the current packet already sent
  logic [15:0] left;

  assign left      = in_len - done;
  assign out_len   = (32'(left) > PW) ? 16'(PW) : left;
  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign out_data  = in_data;
  assign out_last  = in_last || (in_pkt + 16'd1 == out_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= '0; in_pkt <= '0; out_seq <= '0;
    end else if (out_valid && out_ready) begin
      if (out_last) begin
        out_seq <= out_seq + 1'b1;
        in_pkt  <= '0;
        done    <= in_last ? '0 : done + in_pkt + 16'd1;
      end else begin
        in_pkt <= in_pkt + 1'b1;
      end
    end
  end
endmodule
