// fb_module: one polyphase module of the twice-under-decimated analysis
// filter bank.
//
// For one output instant m (newest input sample index t0 = 8m) it computes
// all NSUB sub-band samples
//     y_k[m] = 1/NSUB * sum_n h[n] * x[t0-n] * exp(-j*2*pi*k*(t0-n)/NSUB)
// i.e. each sub-band is shifted to DC, low-pass filtered by the prototype h
// and decimated by NSUB/2. Polyphase form: the TAPS-sample window is
// multiplied by h and folded to NSUB values u[r] = sum_l h[r+16l]*x[t0-r-16l],
// an NSUB-point inverse FFT gives the sub-bands, and since the hop is NSUB/2
// the factor exp(-j*2*pi*k*t0/NSUB) is (-1)^(k*m): sub-bands with odd k are
// negated for odd m (parameter ODD, fixed per module position).
// Latency 1 + log2(NSUB) clocks, one window per clock. The filter-bank
// structure (16 sub-bands, decimation by 8) follows the design description;
// the 32-tap Hann-windowed sinc prototype is this implementation's choice.
module fb_module
  import dfts_pkg::*;
#(
  parameter bit ODD = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t win [TAPS],       // win[n] = x[t0-n], win[0] newest
  output logic  out_valid,
  output cplx_t sb  [NSUB]        // sub-band samples, FFT order (0 = DC)
);
  localparam proto_t H = proto_coefs();

  cplx_t u_q [NSUB];
  logic  u_vld_q;
  cplx_t f_out [NSUB];
  logic  f_vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) u_vld_q <= 1'b0;
    else        u_vld_q <= in_valid;
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < NSUB; r++) begin
      logic signed [47:0] ar, ai;
      ar = 48'sd1 <<< (CFRAC - 1);
      ai = 48'sd1 <<< (CFRAC - 1);
      for (int l = 0; l < TAPS / NSUB; l++) begin
        ar += 48'(H[r + NSUB * l]) * 48'(win[r + NSUB * l].re);
        ai += 48'(H[r + NSUB * l]) * 48'(win[r + NSUB * l].im);
      end
      u_q[r].re <= sat(ar >>> CFRAC);
      u_q[r].im <= sat(ai >>> CFRAC);
    end
  end

  fft_radix2 #(.N(NSUB), .INV(1'b1)) u_ifft (
    .clk, .rst_n,
    .in_valid (u_vld_q),
    .in_data  (u_q),
    .out_valid(f_vld),
    .out_data (f_out)
  );

  always_comb begin
    for (int k = 0; k < NSUB; k++) begin
      if (ODD && k[0]) begin
        sb[k].re = -f_out[k].re;
        sb[k].im = -f_out[k].im;
      end else begin
        sb[k] = f_out[k];
      end
    end
  end
  assign out_valid = f_vld;
endmodule
