// Testbench for tp_logic_equation (8 partitions). Random 256-entry truth tables, among them
// an OR of partitions 0 and 3 and an AND of partitions 1, 2 and 5, are loaded and every
// coincidence pattern is applied; the output one clock later must equal the table entry the
// testbench computes from the equation.
module tb_tp_logic_equation;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] coinc = '0;
  logic [255:0] cfg_table = '0;
  logic met;
  int checks = 0, failures = 0;

  tp_logic_equation #(.NPART(8)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic eq(input int k, input logic [7:0] c);
    case (k)
      0: return c[0] | c[3];
      1: return c[1] & c[2] & c[5];
      2: return ^c;
      default: return c[k % 8] & !c[(k + 3) % 8];
    endcase
  endfunction
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      for (int p = 0; p < 256; p++) cfg_table[p] = eq(k, 8'(p));
      for (int p = 0; p < 256; p++) begin
        @(negedge clk); coinc = 8'(p);
        @(negedge clk);
        chk(met == eq(k, 8'(p)), $sformatf("eq %0d pattern %h", k, p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
