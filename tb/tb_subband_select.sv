// tb_subband_select: random filter-bank vectors and random selections; the
// output one clock later must equal the selected sub-band's 8 samples.
`timescale 1ns/1ps
module tb_subband_select;
  import dfts_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [3:0] sel;
  cplx_t in_data [NFB][NSUB];
  cplx_t out_data [NFB];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  subband_select dut (.*);
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      cplx_t exp_d [NFB];
      @(negedge clk);
      sel = 4'($urandom);
      for (int j = 0; j < NFB; j++) for (int k = 0; k < NSUB; k++) in_data[j][k] = cplx_t'($urandom);
      for (int j = 0; j < NFB; j++) exp_d[j] = in_data[j][sel];
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: valid"); end
      for (int j = 0; j < NFB; j++) begin
        checks++;
        if (out_data[j] != exp_d[j]) begin failures++; if (failures < 10) $display("FAIL sel %0d lane %0d", sel, j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
