// tb_qam16_slicer: random Gray-coded bit patterns are mapped here to the
// levels +-512, +-1536 plus noise of up to +-450, and the slicer must
// return exactly the same bits one clock later.
`timescale 1ns/1ps
module tb_qam16_slicer;
  import dfts_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, out_valid, out_first;
  cplx_t in_data [NSC];
  logic [4*NSC-1:0] out_bits;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  qam16_slicer dut (.*);
  function automatic int lv(input bit msb, input bit lsb);
    return (msb ? 1 : -1) * (lsb ? 512 : 1536) + $signed($urandom_range(0, 900)) - 450;
  endfunction
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [4*NSC-1:0] eb;
      @(negedge clk);
      for (int i = 0; i < 4 * NSC; i++) eb[i] = 1'($urandom);
      for (int k = 0; k < NSC; k++) begin
        in_data[k].re = 16'(lv(eb[4*k], eb[4*k+1]));
        in_data[k].im = 16'(lv(eb[4*k+2], eb[4*k+3]));
      end
      in_valid = 1; in_first = t[0];
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_first != t[0]) begin failures++; $display("FAIL: valid"); end
      for (int i = 0; i < 4 * NSC; i++) begin
        checks++;
        if (out_bits[i] != eb[i]) begin failures++; if (failures < 10) $display("FAIL bit %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
