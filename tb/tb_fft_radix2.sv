// tb_fft_radix2: random vectors through a 16-point inverse transform with
// every stage halved (the filter-bank configuration) and a 64-point forward
// transform halved in three stages (the de-spreading configuration). The
// outputs are compared with a direct DFT computed here in floating point,
// within 10 LSB (stage rounding is biased and adds up over 6 stages), and the latency of log2(N) clocks is checked.
`timescale 1ns/1ps
module tb_fft_radix2;
  import dfts_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic v16 = 0, v64 = 0, o16, o64;
  cplx_t a16 [16], b16 [16], a64 [64], b64 [64];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  fft_radix2 #(.N(16), .INV(1'b1)) dut16 (.clk, .rst_n, .in_valid(v16), .in_data(a16), .out_valid(o16), .out_data(b16));
  fft_radix2 #(.N(64), .INV(1'b0), .SCALE_MASK(32'h15)) dut64 (.clk, .rst_n, .in_valid(v64), .in_data(a64), .out_valid(o64), .out_data(b64));
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input int n);
    real er [64], ei [64], sc, sgn, err;
    sc = (n == 16) ? 1.0 / 16.0 : 1.0 / 8.0;
    sgn = (n == 16) ? 1.0 : -1.0;
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      cplx_t x;
      x.re = 16'($signed($urandom_range(0, 8000)) - 4000);
      x.im = 16'($signed($urandom_range(0, 8000)) - 4000);
      if (n == 16) a16[i] = x; else a64[i] = x;
    end
    for (int k = 0; k < n; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int i = 0; i < n; i++) begin
        real xr, xi, c, s;
        xr = (n == 16) ? real'(a16[i].re) : real'(a64[i].re);
        xi = (n == 16) ? real'(a16[i].im) : real'(a64[i].im);
        c = $cos(2.0 * PI * i * k / n); s = sgn * $sin(2.0 * PI * i * k / n);
        er[k] += sc * (xr * c - xi * s);
        ei[k] += sc * (xr * s + xi * c);
      end
    end
    if (n == 16) v16 = 1; else v64 = 1;
    @(negedge clk);
    v16 = 0; v64 = 0;
    for (int c = 1; c < $clog2(n); c++) begin
      checks++;
      if ((n == 16 ? o16 : o64)) begin failures++; $display("FAIL: early valid"); end
      @(negedge clk);
    end
    checks++;
    if (!(n == 16 ? o16 : o64)) begin failures++; $display("FAIL: valid not at latency %0d", $clog2(n)); end
    for (int k = 0; k < n; k++) begin
      real gr, gi;
      gr = (n == 16) ? real'(b16[k].re) : real'(b64[k].re);
      gi = (n == 16) ? real'(b16[k].im) : real'(b64[k].im);
      err = (gr - er[k]) * (gr - er[k]) + (gi - ei[k]) * (gi - ei[k]);
      checks++;
      if (err > 100.0) begin failures++; if (failures < 10) $display("FAIL N=%0d k=%0d got %f %f exp %f %f", n, k, gr, gi, er[k], ei[k]); end
    end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin run(16); run(64); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
