// dfts_pkg: types and constants shared by the sub-banded DFT-S OFDM receiver.
//
// All datapath samples are complex fixed-point numbers (cplx_t) with SW-bit
// signed I and Q parts; full scale of the ADC maps to +-2^(SW-3) so that the
// filter bank and the transforms keep two bits of headroom. Coefficients
// (twiddles, prototype filter, IQ correction) are Q2.14 (16384 = 1.0).
// The numbers taken from the design description are the 16 sub-bands, the
// factor-8 decimation, 64 samples per clock, 8 filter-bank modules, 64
// sub-carriers per sub-band and an 8-symbol cyclic prefix. Everything else
// here (word widths, prototype filter, preamble length, frame layout) is a
// choice of this implementation.
package dfts_pkg;

  localparam int SW      = 16;   // datapath word width (I or Q)
  localparam int CFRAC   = 14;   // fractional bits of coefficients
  localparam int NSUB    = 16;   // sub-bands in the channel
  localparam int DEC     = 8;    // filter-bank hop (twice under-decimated)
  localparam int LANES   = 64;   // ADC samples per clock
  localparam int NFB     = LANES / DEC;  // time-parallel FB modules (8)
  localparam int TAPS    = 32;   // prototype filter length
  localparam int NSC     = 64;   // sub-carriers (symbols) per DFT-S block
  localparam int NCP     = 8;    // cyclic prefix in symbols
  localparam int SB_LANES = DEC; // sub-band samples per clock (2 per symbol)
  localparam int SYM_LANES = SB_LANES / 2;  // symbols per clock after decim2
  localparam int GOLAY_L = 32;   // length of each Golay sequence of the preamble
  localparam int NTRAIN  = 1;    // training blocks per frame
  localparam int NDATA   = 99;   // data blocks per frame
  localparam int DTRAIN  = 1024; // training symbol amplitude (QPSK)
  localparam int QAM_UNIT = 512; // 16-QAM level spacing/2 after equalization
  localparam int PILOT_SB = 0;   // pilot sub-band (centre of the channel)

  typedef logic signed [SW-1:0] samp_t;
  typedef struct packed {
    samp_t re;
    samp_t im;
  } cplx_t;

  // saturate a wide value to SW bits
  function automatic samp_t sat(input logic signed [47:0] v);
    localparam logic signed [47:0] MAXV = 48'sd2 ** (SW - 1) - 1;
    localparam logic signed [47:0] MINV = -(48'sd2 ** (SW - 1));
    if (v > MAXV) return samp_t'(MAXV);
    if (v < MINV) return samp_t'(MINV);
    return samp_t'(v);
  endfunction

  // complex product a*b where b is a Q2.14 coefficient (result rounded, saturated)
  function automatic cplx_t cmul_q14(input cplx_t a, input cplx_t b);
    logic signed [47:0] pr, pi;
    cplx_t r;
    pr = 48'(a.re) * 48'(b.re) - 48'(a.im) * 48'(b.im);
    pi = 48'(a.re) * 48'(b.im) + 48'(a.im) * 48'(b.re);
    r.re = sat((pr + (48'sd1 <<< (CFRAC - 1))) >>> CFRAC);
    r.im = sat((pi + (48'sd1 <<< (CFRAC - 1))) >>> CFRAC);
    return r;
  endfunction

  // Q2.14 twiddle exp(sign * j*2*pi*k/n)
  function automatic cplx_t twiddle(input int k, input int n, input bit positive);
    real a;
    cplx_t t;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    t.re = samp_t'($rtoi($floor(16384.0 * $cos(a) + 0.5)));
    t.im = samp_t'($rtoi($floor(16384.0 * $sin(a) * (positive ? 1.0 : -1.0) + 0.5)));
    return t;
  endfunction

  // Prototype low-pass of the analysis filter bank: Hann-windowed sinc,
  // cutoff 1/(2*NSUB) cycles per sample, TAPS taps, DC gain NSUB, Q2.14.
  // h[n] = w[n] * sinc((n - (TAPS-1)/2) / NSUB),  w[n] = 0.5 - 0.5 cos(2 pi (n+1)/(TAPS+1))
  typedef logic signed [15:0] coef_t;
  typedef coef_t proto_t [TAPS];
  function automatic proto_t proto_coefs();
    proto_t h;
    real x, s, w, acc;
    real hr [TAPS];
    acc = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      x = (real'(n) - real'(TAPS - 1) / 2.0) / real'(NSUB);
      s = $sin(3.14159265358979323846 * x) / (3.14159265358979323846 * x);
      w = 0.5 - 0.5 * $cos(2.0 * 3.14159265358979323846 * real'(n + 1) / real'(TAPS + 1));
      hr[n] = s * w;
      acc += hr[n];
    end
    for (int n = 0; n < TAPS; n++)
      h[n] = coef_t'($rtoi($floor(16384.0 * hr[n] * real'(NSUB) / acc + 0.5)));
    return h;
  endfunction

  // Golay complementary pair of length 2^p by the recursive construction
  // a' = a|b, b' = a|-b starting from a = b = (+1). Bit = 1 means +1.
  function automatic logic [GOLAY_L-1:0] golay_seq(input bit second);
    logic [GOLAY_L-1:0] a, b, na, nb;
    int len;
    a = '0; b = '0;
    a[0] = 1'b1; b[0] = 1'b1;
    len = 1;
    while (len < GOLAY_L) begin
      na = a; nb = a;
      for (int i = 0; i < len; i++) begin
        na[len + i] = b[i];
        nb[len + i] = ~b[i];
      end
      a = na; b = nb;
      len = len * 2;
    end
    return second ? b : a;
  endfunction

  // Training block: QPSK symbols +-DTRAIN +-j DTRAIN; the bits are taken from
  // a 16-bit Fibonacci LFSR x^16+x^14+x^13+x^11+1, seed 16'hACE1, two bits
  // (I sign then Q sign) per sub-carrier; bit 1 means negative.
  typedef logic [2*NSC-1:0] train_bits_t;
  function automatic train_bits_t train_bits();
    train_bits_t r;
    logic [15:0] s;
    s = 16'hACE1;
    for (int i = 0; i < 2 * NSC; i++) begin
      r[i] = s[0];
      s = {s[0] ^ s[2] ^ s[3] ^ s[5], s[15:1]};
    end
    return r;
  endfunction

endpackage
