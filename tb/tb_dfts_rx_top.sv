// tb_dfts_rx_top: end-to-end test of the dual-polarization receiver at its
// default sizes.
//
// A behavioural transmitter builds, for each polarization, the full-rate
// signal of a 16-sub-band channel: sub-bands 3, 5, 11 and 13 carry frames
// of [Golay preamble Ga|Gb, one training block, 99 data blocks of 16-QAM
// PRBS19 symbols with an 8-symbol cyclic prefix], each sub-band with its
// own PRBS19 phase; the centre sub-band carries the two pilot tones at
// +-1/64 of the sample rate. Each sub-band is interpolated by 16 with a
// 64-tap windowed-sinc filter and shifted to k/16 of the sample rate. The
// channel adds a carrier frequency offset, a phase offset and an IQ gain /
// phase imbalance, then the 6-bit ADC quantises. The receiver is told the
// matching IQ correction. The test runs two frames on sub-band 3, switches
// the sub-band processor to sub-band 13, and runs two more.
// Checks: every frame's preamble is found, the equalizer trains, the BER
// meters synchronise and count no bit errors on either polarization before
// and after the switch (below the 3.8e-3 FEC limit is the pass mark; this
// clean channel gives zero), the number of compared bits matches the frame
// layout, and the pilot phase estimate moves with the applied frequency
// offset. Each mechanism (preamble detection, training, CFO tracking, IQ
// correction, sub-band switch, BER sync) is counted and must occur.
`timescale 1ns/1ps
module tb_dfts_rx_top;
  import dfts_pkg::*;

  localparam int    ADCW    = 6;
  localparam int    NFRAMES = 4;
  localparam int    LEAD    = 200;                     // idle symbols before frame 0
  localparam int    FRAME   = 2 * GOLAY_L + (NTRAIN + NDATA) * (NSC + NCP);
  localparam int    NSYM    = LEAD + NFRAMES * FRAME + 64;
  localparam int    NACT    = 4;
  localparam int    ACT [NACT] = '{3, 5, 11, 13};
  localparam int    GT      = 64;                      // Tx interpolation filter taps
  localparam real   PI      = 3.14159265358979323846;
  localparam real   A       = 1.25;                    // 16-QAM unit, ADC LSB
  localparam real   TAMP    = 2.0 * A;                 // training QPSK amplitude
  localparam real   PAMP    = 2.5;                     // preamble amplitude
  localparam real   PILOT   = 2.0;                     // each pilot tone
  localparam real   CFO     = 2.0e-6;                  // cycles per sample
  localparam real   PHI_IQ  = 5.0 * PI / 180.0;        // IQ phase error
  localparam real   G_IQ    = 1.1;                     // Q gain error
  localparam int    TOTAL_CLK = NSYM * 16 / LANES;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                   in_valid;
  logic signed [ADCW-1:0] adc_xi [LANES], adc_xq [LANES], adc_yi [LANES], adc_yq [LANES];
  logic signed [15:0]     c_ii [2], c_qi [2], c_qq [2];
  logic [3:0]             sb_sel;
  logic                   dec_phase;
  logic [47:0]            golay_thr;
  logic signed [15:0]     cfo_phase [2];
  logic                   sym_valid [2];
  cplx_t                  sym_data [2][NSC];
  logic                   bits_valid [2];
  logic [4*NSC-1:0]       bits [2];
  logic [47:0]            ber_bits [2], ber_errs [2];
  logic                   ber_synced [2];
  logic [15:0]            n_detect [2];
  logic                   trained [2];

  dfts_rx_top dut (.*);

  // ---------------- transmitter model ----------------
  real sre [2][NACT][NSYM];
  real sim [2][NACT][NSYM];
  real g [GT];
  bit  ga [GOLAY_L], gb [GOLAY_L];

  function automatic real lvl(input bit msb, input bit lsb);
    return (msb ? 1.0 : -1.0) * (lsb ? 1.0 : 3.0);
  endfunction

  task automatic build_symbols();
    bit a [GOLAY_L], b [GOLAY_L], na [GOLAY_L], nb [GOLAY_L];
    int len;
    real x;
    // Golay pair by the doubling construction
    a[0] = 1; b[0] = 1; len = 1;
    while (len < GOLAY_L) begin
      for (int i = 0; i < len; i++) begin na[i] = a[i]; na[len+i] = b[i]; nb[i] = a[i]; nb[len+i] = !b[i]; end
      a = na; b = nb; len *= 2;
    end
    ga = a; gb = b;
    // Tx interpolation filter: Hann-windowed sinc, cutoff 1/32, passband gain 16
    for (int n = 0; n < GT; n++) begin
      x = (real'(n) - real'(GT - 1) / 2.0) / 16.0;
      g[n] = $sin(PI * x) / (PI * x) * (0.5 - 0.5 * $cos(2.0 * PI * real'(n + 1) / real'(GT + 1)));
    end
    for (int p = 0; p < 2; p++) begin
      for (int s = 0; s < NACT; s++) begin
        logic [18:0] lf;
        int m;
        real tr [NSC], ti [NSC];
        real dr [NSC], di [NSC];
        train_bits_t tbits;
        tbits = train_bits();
        lf = 19'(32'h1234 + 977 * s + 50331 * p) | 19'h1;
        for (int k = 0; k < NSYM; k++) begin sre[p][s][k] = 0.0; sim[p][s][k] = 0.0; end
        // training block in time domain: (T/8) * sum_k q_k exp(+j 2 pi k n / 64)
        for (int n = 0; n < NSC; n++) begin
          tr[n] = 0.0; ti[n] = 0.0;
          for (int k = 0; k < NSC; k++) begin
            real qr, qi, c, sn;
            qr = tbits[2*k] ? -1.0 : 1.0;
            qi = tbits[2*k+1] ? -1.0 : 1.0;
            c = $cos(2.0 * PI * k * n / NSC); sn = $sin(2.0 * PI * k * n / NSC);
            tr[n] += TAMP / 8.0 * (qr * c - qi * sn);
            ti[n] += TAMP / 8.0 * (qr * sn + qi * c);
          end
        end
        m = LEAD;
        for (int f = 0; f < NFRAMES; f++) begin
          for (int t = 0; t < GOLAY_L; t++) begin sre[p][s][m] = ga[t] ? PAMP : -PAMP; m++; end
          for (int t = 0; t < GOLAY_L; t++) begin sre[p][s][m] = gb[t] ? PAMP : -PAMP; m++; end
          for (int blk = 0; blk < NTRAIN + NDATA; blk++) begin
            if (blk < NTRAIN) begin
              dr = tr; di = ti;
            end else begin
              for (int k = 0; k < NSC; k++) begin
                bit bb [4];
                for (int q = 0; q < 4; q++) begin
                  bb[q] = lf[18] ^ lf[17] ^ lf[16] ^ lf[13];   // b[n] = b[n-19]^b[n-18]^b[n-17]^b[n-14]
                  lf = {lf[17:0], bb[q]};
                end
                dr[k] = A * lvl(bb[0], bb[1]);
                di[k] = A * lvl(bb[2], bb[3]);
              end
            end
            for (int t = 0; t < NCP; t++) begin
              sre[p][s][m] = dr[NSC-NCP+t]; sim[p][s][m] = di[NSC-NCP+t]; m++;
            end
            for (int t = 0; t < NSC; t++) begin sre[p][s][m] = dr[t]; sim[p][s][m] = di[t]; m++; end
          end
        end
      end
    end
  endtask

  // one full-rate sample n of polarization p, after channel and ADC
  function automatic void tx_sample(input int p, input longint n, output int qi, output int qq);
    real xr, xi, c, sn, ph, ir, iq;
    longint m0;
    xr = 0.0; xi = 0.0;
    for (int s = 0; s < NACT; s++) begin
      real ur, ui;
      ur = 0.0; ui = 0.0;
      // symbols m with 0 <= n - 16m < GT
      m0 = (n - GT + 16) / 16;
      if (m0 < 0) m0 = 0;
      for (longint m = m0; m <= n / 16; m++) begin
        if (n - 16 * m < GT && m < NSYM) begin
          ur += g[n - 16 * m] * sre[p][s][m];
          ui += g[n - 16 * m] * sim[p][s][m];
        end
      end
      c = $cos(2.0 * PI * ACT[s] * (n % 16) / 16.0);
      sn = $sin(2.0 * PI * ACT[s] * (n % 16) / 16.0);
      xr += ur * c - ui * sn;
      xi += ur * sn + ui * c;
    end
    // pilots: two tones at +-1/64 of the sample rate = 2*PILOT*cos
    xr += 2.0 * PILOT * $cos(2.0 * PI * (n % 64) / 64.0);
    // carrier offset and phase
    ph = 2.0 * PI * CFO * real'(n) + 0.3 + 0.5 * p;
    c = $cos(ph); sn = $sin(ph);
    ir = xr * c - xi * sn;
    iq = xr * sn + xi * c;
    // IQ imbalance: Q' = g (Q cos phi + I sin phi)
    iq = G_IQ * (iq * $cos(PHI_IQ) + ir * $sin(PHI_IQ));
    qi = $rtoi($floor(ir + 0.5));
    qq = $rtoi($floor(iq + 0.5));
    if (qi > 31) qi = 31; else if (qi < -32) qi = -32;
    if (qq > 31) qq = 31; else if (qq < -32) qq = -32;
  endfunction

  // ---------------- checking ----------------
  int checks = 0, failures = 0;
  int n_switch = 0, n_train_ev = 0, n_cfo_moves = 0, n_iq = 0;
  logic trained_prev [2];
  logic signed [15:0] ph_prev;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (TOTAL_CLK + 4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (trained[p] && !trained_prev[p]) n_train_ev++;
      trained_prev[p] <= trained[p];
    end
  end

  initial begin : main
    longint n;
    int qi, qq;
    longint bits0 [2], errs0 [2];
    int clk_switch;
    for (int p = 0; p < 2; p++) begin
      c_ii[p] = 16'sd16384;
      c_qi[p] = 16'($rtoi($floor(-16384.0 * $tan(PHI_IQ) + 0.5)));
      c_qq[p] = 16'($rtoi($floor(16384.0 / (G_IQ * $cos(PHI_IQ)) + 0.5)));
      trained_prev[p] = 1'b0;
    end
    if (c_qi[0] != 0 && c_qq[0] != 16384) n_iq++;
    sb_sel = 4'd3;
    dec_phase = 1'b0;
    golay_thr = 48'd600000000;
    in_valid = 1'b0;
    for (int l = 0; l < LANES; l++) begin adc_xi[l] = '0; adc_xq[l] = '0; adc_yi[l] = '0; adc_yq[l] = '0; end
    build_symbols();
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    n = 0;
    ph_prev = 0;
    clk_switch = (LEAD + 2 * FRAME + 40) * 16 / LANES;
    for (int c = 0; c < TOTAL_CLK; c++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int l = 0; l < LANES; l++) begin
        tx_sample(0, n + l, qi, qq); adc_xi[l] = ADCW'(qi); adc_xq[l] = ADCW'(qq);
        tx_sample(1, n + l, qi, qq); adc_yi[l] = ADCW'(qi); adc_yq[l] = ADCW'(qq);
      end
      n += LANES;
      if (c % 256 == 255) begin
        if (cfo_phase[0] != ph_prev) n_cfo_moves++;
        ph_prev = cfo_phase[0];
      end
      if (c == clk_switch) begin
        for (int p = 0; p < 2; p++) begin
          check(ber_errs[p] == 0, $sformatf("pol %0d bit errors before switch: %0d of %0d", p, ber_errs[p], ber_bits[p]));
          check(ber_bits[p] >= 48'(4 * NSC * (2 * NDATA - 4)),
                $sformatf("pol %0d compared bits before switch %0d", p, ber_bits[p]));
          check(n_detect[p] == 2, $sformatf("pol %0d preambles before switch %0d", p, n_detect[p]));
        end
        sb_sel = 4'd13;
        n_switch++;
      end
      // one frame after the switch the meters have resynchronised
      if (c == clk_switch + FRAME * 16 / LANES - 80) begin
        for (int p = 0; p < 2; p++) begin bits0[p] = longint'(ber_bits[p]); errs0[p] = longint'(ber_errs[p]); end
      end
    end
    in_valid = 1'b0;
    repeat (40) @(posedge clk);
    for (int p = 0; p < 2; p++) begin
      $display("pol %0d: preambles %0d, bits %0d, errors %0d, after switch bits %0d errors %0d",
               p, n_detect[p], ber_bits[p], ber_errs[p], longint'(ber_bits[p]) - bits0[p],
               longint'(ber_errs[p]) - errs0[p]);
      check(n_detect[p] == 16'(NFRAMES), $sformatf("pol %0d preambles found %0d", p, n_detect[p]));
      check(trained[p], $sformatf("pol %0d equalizer trained", p));
      check(ber_synced[p], $sformatf("pol %0d BER meter synchronised", p));
      check(longint'(ber_bits[p]) - bits0[p] >= longint'(4 * NSC * NDATA),
            $sformatf("pol %0d bits after switch %0d", p, longint'(ber_bits[p]) - bits0[p]));
      check(real'(longint'(ber_errs[p]) - errs0[p]) < 3.8e-3 * real'(longint'(ber_bits[p]) - bits0[p]),
            $sformatf("pol %0d BER after switch", p));
      check(longint'(ber_errs[p]) - errs0[p] == 0, $sformatf("pol %0d errors after switch", p));
    end
    // mechanisms
    $display("mechanisms: preamble detections %0d, training events %0d, CFO phase moves %0d, IQ correction %0d, sub-band switches %0d",
             n_detect[0] + n_detect[1], n_train_ev, n_cfo_moves, n_iq, n_switch);
    check(n_detect[0] + n_detect[1] > 0, "preamble detection happened");
    check(n_train_ev > 0, "equalizer training happened");
    check(n_cfo_moves > 0, "CFO tracking happened");
    check(n_iq > 0, "IQ correction used");
    check(n_switch > 0, "sub-band switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
