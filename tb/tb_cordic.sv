// tb_cordic: random vectors through the vectoring unit (angle checked
// against atan2 computed here, all four quadrants, within 0.05 degree) and
// random angles through the rotating unit (rotating (1/K,0) must give
// cos/sin of the angle within 0.1 %). One clock of latency.
`timescale 1ns/1ps
module tb_cordic;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  logic signed [23:0] vx_in, vy_in, vx, vy, rx, ry;
  logic signed [15:0] vz, rz_in, rz;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  cordic #(.VECTORING(1'b1), .W(24), .AW(16), .ITER(14)) u_v (.clk, .x_in(vx_in), .y_in(vy_in), .z_in(16'sd0), .x_out(vx), .y_out(vy), .z_out(vz));
  cordic #(.VECTORING(1'b0), .W(24), .AW(16), .ITER(14)) u_r (.clk, .x_in(24'sd9949), .y_in(24'sd0), .z_in(rz_in), .x_out(rx), .y_out(ry), .z_out(rz));
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      real a, got, d, ang;
      @(negedge clk);
      vx_in = 24'($signed($urandom_range(0, 2000000)) - 1000000);
      vy_in = 24'($signed($urandom_range(0, 2000000)) - 1000000);
      rz_in = 16'($urandom);
      @(negedge clk);
      a = $atan2(real'(vy_in), real'(vx_in));
      got = real'(vz) / 65536.0 * 2.0 * PI;
      d = got - a;
      while (d > PI) d -= 2.0 * PI;
      while (d < -PI) d += 2.0 * PI;
      checks++;
      if (d > 0.05 * PI / 180.0 || d < -0.05 * PI / 180.0) begin
        failures++; if (failures < 10) $display("FAIL vectoring (%0d,%0d): %f vs %f", vx_in, vy_in, got, a);
      end
      ang = real'(rz_in) / 65536.0 * 2.0 * PI;
      checks++;
      if ((real'(rx) - 16384.0 * $cos(ang)) ** 2 + (real'(ry) - 16384.0 * $sin(ang)) ** 2 > 16.0 * 16.0) begin
        failures++; if (failures < 10) $display("FAIL rotation %0d: %0d %0d", rz_in, rx, ry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
