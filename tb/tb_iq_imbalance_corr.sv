// tb_iq_imbalance_corr: random ADC samples and random coefficients; each
// output lane is compared with I' = c_ii*I >>> 6 and Q' = (c_qi*I +
// c_qq*Q) >>> 6 worked out here in integer arithmetic. Also checks the
// one-clock latency of out_valid.
`timescale 1ns/1ps
module tb_iq_imbalance_corr;
  import dfts_pkg::*;
  localparam int NL = 64, AW = 6;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [AW-1:0] i_in [NL], q_in [NL];
  logic signed [15:0] c_ii, c_qi, c_qq;
  cplx_t out_data [NL];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  iq_imbalance_corr #(.LANES_P(NL), .ADC_W(AW)) dut (.*);
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int ei [NL], eq [NL];
      @(negedge clk);
      c_ii = 16'(16384 + $signed($urandom_range(0, 4000)) - 2000);
      c_qi = 16'($signed($urandom_range(0, 4000)) - 2000);
      c_qq = 16'(16384 + $signed($urandom_range(0, 4000)) - 2000);
      for (int l = 0; l < NL; l++) begin
        i_in[l] = AW'($urandom); q_in[l] = AW'($urandom);
        ei[l] = (int'(c_ii) * int'(i_in[l])) >>> 6;
        eq[l] = (int'(c_qi) * int'(i_in[l]) + int'(c_qq) * int'(q_in[l])) >>> 6;
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: out_valid missing"); end
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (out_data[l].re != 16'(ei[l]) || out_data[l].im != 16'(eq[l])) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d: got %0d %0d exp %0d %0d", l, out_data[l].re, out_data[l].im, ei[l], eq[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
