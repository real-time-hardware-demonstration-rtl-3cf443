// tb_decim2: random 8-sample vectors with both sample phases; the 4 outputs
// one clock later must be samples phase, phase+2, phase+4, phase+6.
`timescale 1ns/1ps
module tb_decim2;
  import dfts_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, phase;
  cplx_t in_data [SB_LANES];
  cplx_t out_data [SYM_LANES];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  decim2 dut (.*);
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      cplx_t e [SYM_LANES];
      @(negedge clk);
      phase = t[0];
      for (int j = 0; j < SB_LANES; j++) in_data[j] = cplx_t'($urandom);
      for (int i = 0; i < SYM_LANES; i++) e[i] = in_data[2 * i + (t % 2)];
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: valid"); end
      for (int i = 0; i < SYM_LANES; i++) begin
        checks++;
        if (out_data[i] != e[i]) begin failures++; if (failures < 10) $display("FAIL lane %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
