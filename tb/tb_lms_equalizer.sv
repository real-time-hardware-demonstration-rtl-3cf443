// tb_lms_equalizer: a random per-sub-carrier channel H_k (gain 0.3..2, any
// phase) is applied to the known training block d_k (QPSK +-1024) and to
// random data blocks x_k. After one training block and the 16 LMS
// iterations, each equalized data output must equal x_k within 1 % + 4 LSB.
// Also checks that training blocks produce no output, that data blocks
// come out one clock later, and that out_first follows in_first.
`timescale 1ns/1ps
module tb_lms_equalizer;
  import dfts_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_valid = 0, in_train = 0, in_first = 0;
  logic out_valid, out_first, trained;
  cplx_t in_data [NSC], out_data [NSC];
  int checks = 0, failures = 0;
  real hr [NSC], hi [NSC];
  always #1 clk = ~clk;
  lms_equalizer dut (.*);
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    train_bits_t tb;
    tb = train_bits();
    for (int k = 0; k < NSC; k++) begin
      real g, p;
      g = 0.3 + 1.7 * real'($urandom_range(0, 1000)) / 1000.0;
      p = 2.0 * PI * real'($urandom_range(0, 1000)) / 1000.0;
      hr[k] = g * $cos(p); hi[k] = g * $sin(p);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      // training block
      @(negedge clk);
      for (int k = 0; k < NSC; k++) begin
        real dr, di;
        dr = tb[2*k] ? -1024.0 : 1024.0;
        di = tb[2*k+1] ? -1024.0 : 1024.0;
        in_data[k].re = 16'($rtoi(hr[k] * dr - hi[k] * di));
        in_data[k].im = 16'($rtoi(hr[k] * di + hi[k] * dr));
      end
      in_valid = 1; in_train = 1;
      @(negedge clk);
      in_valid = 0; in_train = 0;
      checks++;
      if (out_valid) begin failures++; $display("FAIL: output for training block"); end
      repeat (17) @(negedge clk);
      for (int b = 0; b < 5; b++) begin
        real xr [NSC], xi [NSC];
        for (int k = 0; k < NSC; k++) begin
          xr[k] = real'($signed($urandom_range(0, 3000)) - 1500);
          xi[k] = real'($signed($urandom_range(0, 3000)) - 1500);
          in_data[k].re = 16'($rtoi(hr[k] * xr[k] - hi[k] * xi[k]));
          in_data[k].im = 16'($rtoi(hr[k] * xi[k] + hi[k] * xr[k]));
        end
        in_valid = 1; in_first = (b == 0);
        @(negedge clk);
        in_valid = 0; in_first = 0;
        checks++;
        if (!out_valid || out_first != (b == 0)) begin failures++; $display("FAIL: valid/first"); end
        for (int k = 0; k < NSC; k++) begin
          real e2;
          e2 = (real'(out_data[k].re) - xr[k]) ** 2 + (real'(out_data[k].im) - xi[k]) ** 2;
          checks++;
          if (e2 > 0.0001 * (xr[k] ** 2 + xi[k] ** 2) + 16.0 + 32.0 / (hr[k] ** 2 + hi[k] ** 2)) begin
            failures++; if (failures < 10) $display("FAIL k=%0d got %0d,%0d exp %f,%f", k, out_data[k].re, out_data[k].im, xr[k], xi[k]);
          end
        end
        repeat (17) @(negedge clk);
      end
    end
    checks++;
    if (!trained) begin failures++; $display("FAIL: trained"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
