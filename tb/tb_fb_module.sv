// tb_fb_module: random 32-sample windows into an even and an odd filter-bank
// module. Each sub-band output is compared with
//   y_k = (-1)^(k*ODD) / 16 * sum_n h[n] win[n] exp(+j 2 pi k n / 16)
// computed here in floating point; the latency of 5 clocks is checked.
`timescale 1ns/1ps
module tb_fb_module;
  import dfts_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam proto_t H = proto_coefs();
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic ov0, ov1;
  cplx_t win [TAPS];
  cplx_t sb0 [NSUB], sb1 [NSUB];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  fb_module #(.ODD(1'b0)) dut0 (.clk, .rst_n, .in_valid, .win, .out_valid(ov0), .sb(sb0));
  fb_module #(.ODD(1'b1)) dut1 (.clk, .rst_n, .in_valid, .win, .out_valid(ov1), .sb(sb1));
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      real er [NSUB], ei [NSUB];
      @(negedge clk);
      for (int n = 0; n < TAPS; n++) begin
        win[n].re = 16'($signed($urandom_range(0, 8000)) - 4000);
        win[n].im = 16'($signed($urandom_range(0, 8000)) - 4000);
      end
      for (int k = 0; k < NSUB; k++) begin
        er[k] = 0.0; ei[k] = 0.0;
        for (int n = 0; n < TAPS; n++) begin
          real c, s, hv;
          hv = real'(H[n]) / 16384.0 / 16.0;
          c = $cos(2.0 * PI * k * n / 16.0); s = $sin(2.0 * PI * k * n / 16.0);
          er[k] += hv * (real'(win[n].re) * c - real'(win[n].im) * s);
          ei[k] += hv * (real'(win[n].re) * s + real'(win[n].im) * c);
        end
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat (4) begin
        checks++;
        if (ov0) begin failures++; $display("FAIL: early valid"); end
        @(negedge clk);
      end
      checks++;
      if (!ov0 || !ov1) begin failures++; $display("FAIL: valid not after 5 clocks"); end
      for (int k = 0; k < NSUB; k++) begin
        real sg, d0, d1;
        sg = (k % 2 == 1) ? -1.0 : 1.0;
        d0 = (real'(sb0[k].re) - er[k]) ** 2 + (real'(sb0[k].im) - ei[k]) ** 2;
        d1 = (real'(sb1[k].re) - sg * er[k]) ** 2 + (real'(sb1[k].im) - sg * ei[k]) ** 2;
        checks += 2;
        if (d0 > 25.0) begin failures++; if (failures < 10) $display("FAIL even k=%0d", k); end
        if (d1 > 25.0) begin failures++; if (failures < 10) $display("FAIL odd k=%0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
