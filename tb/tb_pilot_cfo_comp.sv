// tb_pilot_cfo_comp: the pilot sub-band carries the two +-1/8 tones with an
// unknown tone delay (+-1 rad) and a carrier phase that ramps by 0.02 rad
// per clock (wrapping several times); the other sub-bands carry random
// samples. Checks: out_valid on the 7th clock edge after the input; the reported phase
// follows the carrier phase (up to the inherent pi ambiguity, which must
// stay the same) within 2 degrees; every output sample equals its input
// de-rotated by the carrier phase within 5 %.
`timescale 1ns/1ps
module tb_pilot_cfo_comp;
  import dfts_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NCLK = 600;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t in_data [NFB][NSUB];
  cplx_t out_data [NFB][NSUB];
  logic signed [15:0] phase;
  int checks = 0, failures = 0;
  cplx_t hist [NCLK][NFB][NSUB];
  real   phi [NCLK];
  always #1 clk = ~clk;
  pilot_cfo_comp dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic real wrap(input real a);
    while (a > PI) a -= 2.0 * PI;
    while (a < -PI) a += 2.0 * PI;
    return a;
  endfunction
  initial begin
    int oc, lat, amb;
    repeat (2) @(posedge clk);
    rst_n = 1;
    oc = 0; lat = -1; amb = -1;
    fork begin
      for (int c = 0; c < NCLK; c++) begin
        @(negedge clk);
        phi[c] = 0.4 + 0.02 * c;
        for (int j = 0; j < NFB; j++) begin
          real a;
          a = PI * (8 * c + j) / 4.0;
          for (int k = 0; k < NSUB; k++) begin
            if (k == PILOT_SB) begin
              in_data[j][k].re = 16'($rtoi(600.0 * ($cos(a - 1.0 + phi[c]) + $cos(-a + 1.0 + phi[c]))));
              in_data[j][k].im = 16'($rtoi(600.0 * ($sin(a - 1.0 + phi[c]) + $sin(-a + 1.0 + phi[c]))));
            end else begin
              in_data[j][k].re = 16'($signed($urandom_range(0, 4000)) - 2000);
              in_data[j][k].im = 16'($signed($urandom_range(0, 4000)) - 2000);
            end
          end
        end
        hist[c] = in_data;
        in_valid = 1;
      end
      @(negedge clk) in_valid = 0;
    end join_none
    fork
      for (int t = 0; t < NCLK + 12; t++) begin
        @(posedge clk);
        #0.1;
        if (out_valid) begin
          real est, d;
          if (lat < 0) begin
            lat = t;
            checks++;
            if (t != 6) begin failures++; $display("FAIL: output on clock edge %0d, expected 6 (7 registers)", t); end
          end
          if (oc >= 20) begin
            est = real'(phase) / 65536.0 * 2.0 * PI;
            d = wrap(est - (phi[oc] + 0.01));
            if (amb < 0) amb = (d > PI / 2.0 || d < -PI / 2.0) ? 1 : 0;
            if (amb == 1) d = wrap(d + PI);
            checks++;
            if (d > 2.0 * PI / 180.0 || d < -2.0 * PI / 180.0) begin
              failures++; if (failures < 10 || oc % 50 == 0) $display("FAIL phase at %0d: est %f true %f", oc, est, phi[oc]);
            end
            for (int j = 0; j < NFB; j++) begin
              for (int k = 1; k < NSUB; k++) begin
                real c2, s2, er, ei, ph, e2, m2;
                ph = phi[oc] + (amb == 1 ? PI : 0.0);
                c2 = $cos(-ph); s2 = $sin(-ph);
                er = real'(hist[oc][j][k].re) * c2 - real'(hist[oc][j][k].im) * s2;
                ei = real'(hist[oc][j][k].re) * s2 + real'(hist[oc][j][k].im) * c2;
                e2 = (er - real'(out_data[j][k].re)) ** 2 + (ei - real'(out_data[j][k].im)) ** 2;
                m2 = er * er + ei * ei;
                checks++;
                if (e2 > 0.0025 * m2 + 100.0) begin
                  failures++; if (failures < 10) $display("FAIL data at %0d lane %0d sb %0d", oc, j, k);
                end
              end
            end
          end
          oc++;
        end
      end
    join
    checks++;
    if (oc != NCLK) begin failures++; $display("FAIL: %0d outputs", oc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
