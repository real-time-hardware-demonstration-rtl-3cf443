// cordic: CORDIC rotator / vectoring unit with ITER micro-rotations.
//
// Angles are AW-bit two's complement fractions of a full turn (2^AW = 2*pi).
// VECTORING=1: rotates (x_in, y_in) onto the positive x axis and returns its
// angle in z_out (x_out = K*|v|, K ~ 1.6468). VECTORING=0: rotates (x_in,
// y_in) by the angle z_in (result scaled by K). A first step rotates by pi
// when the vector (or angle) lies in the left half plane, so the whole
// circle is covered. The micro-rotations are unrolled combinationally with
// one output register: latency 1 clock, one result per clock. Used to turn
// the pilot phasor into an angle and back into a unit phasor; the use of a
// CORDIC is this implementation's choice.
module cordic #(
  parameter bit VECTORING = 1'b1,
  parameter int W         = 24,
  parameter int AW        = 16,
  parameter int ITER      = 14
) (
  input  logic                 clk,
  input  logic signed [W-1:0]  x_in,
  input  logic signed [W-1:0]  y_in,
  input  logic signed [AW-1:0] z_in,
  output logic signed [W-1:0]  x_out,
  output logic signed [W-1:0]  y_out,
  output logic signed [AW-1:0] z_out
);
  typedef logic signed [AW-1:0] atan_t [ITER];
  function automatic atan_t mk_atan();
    atan_t t;
    for (int i = 0; i < ITER; i++)
      t[i] = AW'($rtoi($floor($atan(1.0 / real'(2 ** i)) / (2.0 * 3.14159265358979323846)
                              * real'(2.0 ** AW) + 0.5)));
    return t;
  endfunction
  localparam atan_t ATAN = mk_atan();
  localparam logic signed [AW-1:0] PI = {1'b1, {(AW-1){1'b0}}};  // -pi == +pi

  always_ff @(posedge clk) begin
    logic signed [W+1:0]  x, y, xn;
    logic signed [AW-1:0] z;
    x = (W+2)'(x_in);
    y = (W+2)'(y_in);
    z = VECTORING ? '0 : z_in;
    if (VECTORING ? (x < 0) : (z[AW-1] != z[AW-2])) begin
      x = -x;
      y = -y;
      z = z + PI;   // vectoring: angle of result is pi more; rotation: pi of it done
    end
    for (int i = 0; i < ITER; i++) begin
      if (VECTORING ? (y < 0) : (z >= 0)) begin
        xn = x - (y >>> i);
        y  = y + (x >>> i);
        x  = xn;
        z  = z - ATAN[i];
      end else begin
        xn = x + (y >>> i);
        y  = y - (x >>> i);
        x  = xn;
        z  = z + ATAN[i];
      end
    end
    x_out <= W'(x);
    y_out <= W'(y);
    z_out <= z;
  end
endmodule
