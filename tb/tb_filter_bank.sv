// tb_filter_bank: drives a random complex stream at 64 samples per clock
// and compares every output sample of every sub-band with the defining sum
//   y_k[m] = 1/16 * sum_n h[n] x[8m-n] exp(-j 2 pi k (8m-n)/16)
// evaluated here in floating point (h is the prototype of dfts_pkg). Also
// checks that a new set of 8 x 16 samples leaves every clock, 5 clocks after
// its input, and that a tone placed in one sub-band lands in that sub-band.
`timescale 1ns/1ps
module tb_filter_bank;
  import dfts_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NCLK = 40;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t in_data [LANES];
  cplx_t out_data [NFB][NSUB];
  int checks = 0, failures = 0;
  real xr [NCLK*LANES], xi [NCLK*LANES];
  localparam proto_t H = proto_coefs();
  always #1 clk = ~clk;
  filter_bank dut (.*);
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int outc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NCLK * LANES; i++) begin
      if (i < 20 * LANES) begin
        xr[i] = real'($signed($urandom_range(0, 4000)) - 2000);
        xi[i] = real'($signed($urandom_range(0, 4000)) - 2000);
      end else begin   // tone in the middle of sub-band 5
        xr[i] = 3000.0 * $cos(2.0 * PI * 5.0 * i / 16.0);
        xi[i] = 3000.0 * $sin(2.0 * PI * 5.0 * i / 16.0);
      end
    end
    outc = 0;
    fork
      for (int c = 0; c < NCLK; c++) begin
        @(negedge clk);
        in_valid = 1;
        for (int l = 0; l < LANES; l++) begin
          in_data[l].re = 16'($rtoi(xr[c * LANES + l]));
          in_data[l].im = 16'($rtoi(xi[c * LANES + l]));
        end
      end
      for (int c = 0; c < NCLK + 4; c++) begin
        @(posedge clk);
        #0.1;
        checks++;
        if (out_valid != (c >= 4 && c < NCLK + 4)) begin
          failures++; $display("FAIL: out_valid %0d at clock %0d (latency 5)", out_valid, c);
        end
        if (c >= 4 && c < NCLK + 4) begin
          int oc;
          oc = c - 4;     // input clock of this output
          if (oc >= 1) begin
            for (int j = 0; j < NFB; j++) begin
              int m;
              m = 8 * oc + j;
              for (int k = 0; k < NSUB; k++) begin
                real er, ei, e2;
                er = 0.0; ei = 0.0;
                for (int n = 0; n < TAPS; n++) begin
                  real a, c2, s2;
                  a = -2.0 * PI * k * ((8 * m - n) % 16) / 16.0;
                  c2 = $cos(a); s2 = $sin(a);
                  er += real'(H[n]) / 16384.0 / 16.0 * (xr[8*m-n] * c2 - xi[8*m-n] * s2);
                  ei += real'(H[n]) / 16384.0 / 16.0 * (xr[8*m-n] * s2 + xi[8*m-n] * c2);
                end
                e2 = (er - real'(out_data[j][k].re)) ** 2 + (ei - real'(out_data[j][k].im)) ** 2;
                checks++;
                if (e2 > 25.0) begin
                  failures++;
                  if (failures < 10) $display("FAIL m=%0d k=%0d got %0d,%0d exp %f,%f", m, k, out_data[j][k].re, $signed(out_data[j][k].im), er, ei);
                end
                if (oc >= 22 && j == 0) begin
                  checks++;
                  if ((k == 5) != (e2 >= 0.0 && (er * er + ei * ei) > 1.0e6)) begin
                    failures++; $display("FAIL: tone power in sub-band %0d", k);
                  end
                end
              end
            end
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
