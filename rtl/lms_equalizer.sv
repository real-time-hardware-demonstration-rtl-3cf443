// lms_equalizer: adaptive one-tap-per-sub-carrier frequency-domain
// equalizer.
//
// Each of the NSC sub-carriers has a complex weight w_k (Q.14, WW bits).
// Data block: z_k = w_k * y_k, output one clock later with out_valid.
// Training block (in_train): the observed vector y is stored and ITER LMS
// iterations are run, one per clock, against the known training symbols
// d_k (QPSK +-DTRAIN, from dfts_pkg::train_bits):
//     e_k = d_k - w_k*y_k,   w_k += e_k * conj(y_k) / 2^(p_k+1)
// where p_k = floor(log2 |y_k|^2), a power-of-two normalised step that needs
// no divider and shrinks the error by at least half per iteration. ITER must
// not exceed the block period (18 clocks at 4 symbols per clock); blocks
// arriving meanwhile are equalized with the current weights. Weights reset
// to zero, so the first training block of a frame sets them up. An LMS
// channel equalizer follows the design description; per-sub-carrier one-tap
// form, the step rule and the training pattern are this implementation's.
module lms_equalizer
  import dfts_pkg::*;
#(
  parameter int ITER = 16,
  parameter int WW   = 24
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data [NSC],
  input  logic  in_train,
  input  logic  in_first,
  output logic  out_valid,
  output cplx_t out_data [NSC],
  output logic  out_first,
  output logic  trained           // at least one training block used
);
  localparam train_bits_t TB = train_bits();

  logic signed [WW-1:0] w_re [NSC];
  logic signed [WW-1:0] w_im [NSC];
  cplx_t                ytr  [NSC];
  logic [5:0]           p_q  [NSC];
  logic                 nz_q [NSC];
  logic [7:0]           iter_q;

  // |y|^2 of a 16-bit complex sample fits in 33 bits
  function automatic logic [5:0] flog2(input logic [33:0] v);
    logic [5:0] r;
    r = '0;
    for (int b = 0; b < 34; b++) if (v[b]) r = 6'(b);
    return r;
  endfunction

  // complex product of a Q.14 weight and a sample, in sample units
  function automatic cplx_t wmul(input logic signed [WW-1:0] wr, input logic signed [WW-1:0] wi,
                                 input cplx_t y);
    logic signed [63:0] pr, pi;
    cplx_t r;
    pr = 64'(wr) * 64'(y.re) - 64'(wi) * 64'(y.im);
    pi = 64'(wr) * 64'(y.im) + 64'(wi) * 64'(y.re);
    r.re = sat(48'((pr + (64'sd1 <<< (CFRAC - 1))) >>> CFRAC));
    r.im = sat(48'((pi + (64'sd1 <<< (CFRAC - 1))) >>> CFRAC));
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NSC; k++) begin w_re[k] <= '0; w_im[k] <= '0; end
      iter_q    <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      trained   <= 1'b0;
    end else begin
      out_valid <= in_valid && !in_train;
      out_first <= in_valid && !in_train && in_first;
      if (in_valid && in_train) begin
        iter_q  <= 8'(ITER);
        trained <= 1'b1;
      end else if (iter_q != 0) begin
        iter_q <= iter_q - 8'd1;
        for (int k = 0; k < NSC; k++) begin
          cplx_t z;
          logic signed [63:0] er, ei, gr, gi;
          z  = wmul(w_re[k], w_im[k], ytr[k]);
          er = (TB[2*k]   ? -64'(DTRAIN) : 64'(DTRAIN)) - 64'(z.re);
          ei = (TB[2*k+1] ? -64'(DTRAIN) : 64'(DTRAIN)) - 64'(z.im);
          // e * conj(y)
          gr = er * 64'(ytr[k].re) + ei * 64'(ytr[k].im);
          gi = ei * 64'(ytr[k].re) - er * 64'(ytr[k].im);
          if (nz_q[k]) begin
            w_re[k] <= w_re[k] + WW'(((gr <<< CFRAC) >>> (int'(p_q[k]) + 1)));
            w_im[k] <= w_im[k] + WW'(((gi <<< CFRAC) >>> (int'(p_q[k]) + 1)));
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_train) begin
      for (int k = 0; k < NSC; k++) begin
        logic [63:0] pw;
        pw = 64'(64'(in_data[k].re) * 64'(in_data[k].re)) + 64'(64'(in_data[k].im) * 64'(in_data[k].im));
        ytr[k]  <= in_data[k];
        p_q[k]  <= flog2(pw[33:0]);
        nz_q[k] <= pw != 0;
      end
    end
    for (int k = 0; k < NSC; k++) out_data[k] <= wmul(w_re[k], w_im[k], in_data[k]);
  end
endmodule
