// fft_radix2: pipelined N-point radix-2 FFT (INV=0) or IFFT (INV=1).
//
// Computes X[k] = sum_n x[n] * exp(-+j*2*pi*n*k/N) on a whole vector at a
// time: the input is put in bit-reversed order and passed through log2(N)
// decimation-in-time butterfly stages, one registered stage per clock, so a
// new vector can enter every clock and leaves LOG2N clocks later with
// out_valid. Stage s is divided by two when bit s of SCALE_MASK is set
// (all set: the result is X/N). Twiddles are Q2.14 values computed at
// elaboration; butterfly results are rounded and saturated to SW bits.
// The receiver uses it as the 16-point transform of each filter-bank
// module and as the 64-point DFT / IDFT of the DFT-S de-spreading; the
// radix-2 structure and the scaling are choices of this implementation.
module fft_radix2
  import dfts_pkg::*;
#(
  parameter int          N          = 16,
  parameter bit          INV        = 1'b0,
  parameter logic [31:0] SCALE_MASK = 32'hFFFF_FFFF
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data  [N],
  output logic  out_valid,
  output cplx_t out_data [N]
);
  localparam int LOG2N = $clog2(N);

  typedef logic [N/2-1:0][2*SW-1:0] tw_t;
  function automatic tw_t mk_tw();
    tw_t t;
    for (int k = 0; k < N / 2; k++) t[k] = twiddle(k, N, INV);
    return t;
  endfunction
  localparam tw_t TW = mk_tw();

  function automatic int bitrev(input int v);
    int r;
    r = 0;
    for (int b = 0; b < LOG2N; b++) if (v[b]) r |= 1 << (LOG2N - 1 - b);
    return r;
  endfunction

  cplx_t stage_q [LOG2N+1][N];
  logic  vld_q   [LOG2N+1];

  always_comb begin
    for (int n = 0; n < N; n++) stage_q[0][n] = in_data[bitrev(n)];
    vld_q[0] = in_valid;
  end

  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    localparam int HALF = 1 << s;
    localparam int SH   = SCALE_MASK[s] ? 1 : 0;
    cplx_t nxt [N];
    always_comb begin
      for (int g = 0; g < N; g += 2 * HALF) begin
        for (int j = 0; j < HALF; j++) begin
          cplx_t a, b;
          logic signed [47:0] sr, si, dr, di;
          a  = stage_q[s][g + j];
          b  = cmul_q14(stage_q[s][g + j + HALF], cplx_t'(TW[j * (N / (2 * HALF))]));
          sr = 48'(a.re) + 48'(b.re);
          si = 48'(a.im) + 48'(b.im);
          dr = 48'(a.re) - 48'(b.re);
          di = 48'(a.im) - 48'(b.im);
          if (SH != 0) begin
            sr = (sr + 48'sd1) >>> 1;
            si = (si + 48'sd1) >>> 1;
            dr = (dr + 48'sd1) >>> 1;
            di = (di + 48'sd1) >>> 1;
          end
          nxt[g + j].re        = sat(sr);
          nxt[g + j].im        = sat(si);
          nxt[g + j + HALF].re = sat(dr);
          nxt[g + j + HALF].im = sat(di);
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_q[s+1] <= 1'b0;
      else        vld_q[s+1] <= vld_q[s];
    end
    always_ff @(posedge clk) stage_q[s+1] <= nxt;
  end

  assign out_valid = vld_q[LOG2N];
  assign out_data  = stage_q[LOG2N];
endmodule
