// pilot_cfo_comp: pilot-aided carrier frequency offset and phase-noise
// correction at the filter-bank output.
//
// The pilot sub-band (centre of the channel) carries two tones at +-1/8 of
// the sub-band sample rate (+-415.6 MHz at 3.325 GS/s). Lane j of a clock is
// sample 8c+j, so each tone is brought to DC by weighting lane j with
// exp(-+j*pi*j/4) and summing the 8 lanes (8 samples are a whole number of
// periods); the two sums are averaged over NAVG clocks. A common carrier
// phase phi turns the tones into A*exp(j(phi-d)) and A*exp(j(phi+d)), where
// d is whatever delay the tones saw, so the product of the two averages has
// angle 2*phi independent of d. A vectoring CORDIC gives that angle; it is
// unwrapped over time (the carrier phase moves slowly) and halved, and a
// rotating CORDIC turns -phi into the Q2.14 phasor exp(-j*phi). Every
// sample of every sub-band, delayed so that the estimate window is centred
// on it, is multiplied by that phasor; the phase is held for the 8 samples
// of a clock. The result removes the frequency offset and the common phase
// noise. Output on the 7th clock edge after the input (DLY+1 registers), one vector per clock. Pilot placement and
// frequencies follow the design description; the estimator (tone
// extraction, product, CORDICs, unwrapping) is this implementation's choice.
module pilot_cfo_comp
  import dfts_pkg::*;
#(
  parameter int PILOT = PILOT_SB,
  parameter int NAVG  = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  cplx_t        in_data  [NFB][NSUB],
  output logic         out_valid,
  output cplx_t        out_data [NFB][NSUB],
  output logic signed [15:0] phase          // estimated phase, 2^16 = 2*pi
);
  localparam int DLY = 4 + NAVG / 2;
  localparam int CW  = 24;
  localparam int VW  = 32;
  // exp(j*pi*j/4), Q2.14
  localparam logic signed [15:0] C8 [8] = '{16384, 11585, 0, -11585, -16384, -11585, 0, 11585};
  localparam logic signed [15:0] S8 [8] = '{0, 11585, 16384, 11585, 0, -11585, -16384, -11585};

  // tone extraction, one value per tone per clock
  logic signed [CW-1:0] pp_re_q, pp_im_q, pm_re_q, pm_im_q;
  always_ff @(posedge clk) begin
    logic signed [47:0] ar, ai, br, bi, yr, yi, c, s;
    ar = '0; ai = '0; br = '0; bi = '0;
    for (int j = 0; j < NFB; j++) begin
      yr = 48'(in_data[j][PILOT].re);
      yi = 48'(in_data[j][PILOT].im);
      c  = 48'(C8[j % 8]);
      s  = 48'(S8[j % 8]);
      ar += yr * c + yi * s;     // y * exp(-j pi j/4): tone at +1/8
      ai += yi * c - yr * s;
      br += yr * c - yi * s;     // y * exp(+j pi j/4): tone at -1/8
      bi += yi * c + yr * s;
    end
    pp_re_q <= CW'(ar >>> CFRAC);
    pp_im_q <= CW'(ai >>> CFRAC);
    pm_re_q <= CW'(br >>> CFRAC);
    pm_im_q <= CW'(bi >>> CFRAC);
  end

  // moving sums over NAVG clocks
  logic signed [CW-1:0] hp_re [NAVG], hp_im [NAVG], hm_re [NAVG], hm_im [NAVG];
  logic signed [CW-1:0] sp_re_q, sp_im_q, sm_re_q, sm_im_q;
  always_ff @(posedge clk) begin
    logic signed [CW+3:0] a, b, c, d;
    hp_re[0] <= pp_re_q; hp_im[0] <= pp_im_q;
    hm_re[0] <= pm_re_q; hm_im[0] <= pm_im_q;
    for (int i = 1; i < NAVG; i++) begin
      hp_re[i] <= hp_re[i-1]; hp_im[i] <= hp_im[i-1];
      hm_re[i] <= hm_re[i-1]; hm_im[i] <= hm_im[i-1];
    end
    a = (CW+4)'(pp_re_q); b = (CW+4)'(pp_im_q);
    c = (CW+4)'(pm_re_q); d = (CW+4)'(pm_im_q);
    for (int i = 0; i < NAVG - 1; i++) begin
      a += (CW+4)'(hp_re[i]); b += (CW+4)'(hp_im[i]);
      c += (CW+4)'(hm_re[i]); d += (CW+4)'(hm_im[i]);
    end
    sp_re_q <= CW'(a >>> $clog2(NAVG)); sp_im_q <= CW'(b >>> $clog2(NAVG));
    sm_re_q <= CW'(c >>> $clog2(NAVG)); sm_im_q <= CW'(d >>> $clog2(NAVG));
  end

  // product of the two tones: angle 2*phi
  logic signed [VW-1:0] q_re_q, q_im_q;
  always_ff @(posedge clk) begin
    logic signed [63:0] r, i;
    r = 64'(sp_re_q) * 64'(sm_re_q) - 64'(sp_im_q) * 64'(sm_im_q);
    i = 64'(sp_re_q) * 64'(sm_im_q) + 64'(sp_im_q) * 64'(sm_re_q);
    q_re_q <= VW'(r >>> 16);
    q_im_q <= VW'(i >>> 16);
  end

  logic signed [VW-1:0] vx, vy;
  logic signed [15:0]   ang2;
  cordic #(.VECTORING(1'b1), .W(VW), .AW(16), .ITER(15)) u_vec (
    .clk, .x_in(q_re_q), .y_in(q_im_q), .z_in('0),
    .x_out(vx), .y_out(vy), .z_out(ang2)
  );

  // unwrap 2*phi and halve it
  logic signed [15:0] ang2_prev_q;
  logic        [16:0] unw_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ang2_prev_q <= '0;
      unw_q       <= '0;
    end else begin
      ang2_prev_q <= ang2;
      // 17-bit accumulator of 2*phi (2^17 = 4*pi): add the wrapped step
      unw_q       <= unw_q + 17'(signed'(16'(ang2 - ang2_prev_q)));
    end
  end
  assign phase = unw_q[16:1];

  // rotate (1/K, 0) by -phi: gives cos(phi) - j sin(phi) in Q2.14
  logic signed [CW-1:0] px, py;
  logic signed [15:0]   zres;
  cordic #(.VECTORING(1'b0), .W(CW), .AW(16), .ITER(14)) u_rot (
    .clk, .x_in(CW'(9949)), .y_in('0), .z_in(-phase),
    .x_out(px), .y_out(py), .z_out(zres)
  );

  // data delay line
  cplx_t dly_q [DLY][NFB][NSUB];
  logic  vld_q [DLY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DLY; i++) vld_q[i] <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      vld_q[0] <= in_valid;
      for (int i = 1; i < DLY; i++) vld_q[i] <= vld_q[i-1];
      out_valid <= vld_q[DLY-1];
    end
  end
  always_ff @(posedge clk) begin
    cplx_t rot;
    dly_q[0] <= in_data;
    for (int i = 1; i < DLY; i++) dly_q[i] <= dly_q[i-1];
    rot.re = samp_t'(px);
    rot.im = samp_t'(py);
    for (int j = 0; j < NFB; j++)
      for (int k = 0; k < NSUB; k++)
        out_data[j][k] <= cmul_q14(dly_q[DLY-1][j][k], rot);
  end

  logic unused;
  assign unused = ^{vx, vy, zres, px[CW-1:SW], py[CW-1:SW]};
endmodule
