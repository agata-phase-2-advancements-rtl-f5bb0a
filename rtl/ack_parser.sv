// ack_parser: the request parser of the selective repeat path. It reads the frames the
// server sends back to a STARE lane (64-bit valid stream with last, as delivered by the
// network stack, headers laid out as udp_tx sends them) and skips the six header words.
// Every payload word of the form {32'h41434B00 ("ACK"), seq[31:0]} acknowledges frame seq
// and gives a one-cycle ack_valid. Other words are ignored and counted. The document only
// names this step; the acknowledgement word format is this design's own choice.
module ack_parser (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [63:0]  in_data,
  input  logic         in_last,
  output logic         ack_valid,
  output logic [31:0]  ack_seq,
  output logic [31:0]  n_ignored
);
  localparam logic [31:0] ACK_TAG = 32'h41434B00;
  logic [2:0] hw;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hw <= '0; ack_valid <= 1'b0; ack_seq <= '0; n_ignored <= '0;
    end else begin
      ack_valid <= 1'b0;
      if (in_valid) begin
        if (hw < 3'd6) hw <= hw + 1'b1;
        else if (in_data[63:32] == ACK_TAG) begin
          ack_valid <= 1'b1;
          ack_seq   <= in_data[31:0];
        end else n_ignored <= n_ignored + 1'b1;
        if (in_last) hw <= '0;
      end
    end
  end
endmodule
