// tp_logic_equation: evaluates the user's logic equation on the coincidence windows of the
// NPART partitions. The equation is given as its truth table, cfg_table: bit v is the
// result for the window pattern v (partition p in bit p), so any Boolean function of the
// eight windows can be set. met is registered: it follows coinc by one clock. The truth
// table form is this design's way to hold a user-defined equation.
module tp_logic_equation #(
  parameter int unsigned NPART = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NPART-1:0]      coinc,
  input  logic [(1<<NPART)-1:0] cfg_table,
  output logic                  met
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) met <= 1'b0;
    else        met <= cfg_table[coinc];
  end
endmodule
