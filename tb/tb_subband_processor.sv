// tb_subband_processor: one sub-band processor fed directly with a sub-band
// signal at 2 samples per symbol (each symbol repeated, 8 samples = 4
// symbols per clock). Two frames of [Golay Ga|Gb preamble at +-1024,
// training block (64-point IFFT of the QPSK training pattern, scaled so the
// receiver FFT returns +-1024), 99 data blocks of 16-QAM PRBS19 symbols at
// +-512/+-1536], each block with an 8-symbol cyclic prefix, follow 200 idle
// symbols. A flat channel gain 0.8*exp(j0.7) must be removed by the
// equalizer. Checks: both preambles detected, the equalizer trained, every
// output symbol within 15 % of the unit of a 16-QAM point, 2*99 data
// blocks delivered, the BER meter synchronised with zero bit errors and at
// least 2*97 blocks of bits compared.
`timescale 1ns/1ps
module tb_subband_processor;
  import dfts_pkg::*;
  localparam int  LEAD  = 200;
  localparam int  FRAME = 2 * GOLAY_L + (NTRAIN + NDATA) * (NSC + NCP);
  localparam int  NSYM  = LEAD + 2 * FRAME + 400;
  localparam real PI    = 3.14159265358979323846;
  localparam real HR    = 0.8 * 0.764842187;    // 0.8 cos(0.7)
  localparam real HI    = 0.8 * 0.644217687;    // 0.8 sin(0.7)
  logic clk = 0, rst_n = 0, in_valid = 0, dec_phase = 0;
  cplx_t in_data [SB_LANES];
  logic [47:0] thr = 48'd1200000000;
  logic sym_valid, bits_valid, ber_synced, trained;
  cplx_t sym_data [NSC];
  logic [4*NSC-1:0] bits;
  logic [47:0] ber_bits, ber_errs;
  logic [15:0] n_detect;
  int checks = 0, failures = 0;
  real sre [NSYM], sim [NSYM];
  always #1 clk = ~clk;
  subband_processor dut (.*);
  initial begin
    repeat (NSYM / 4 + 600) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic real lvl(input bit msb, input bit lsb);
    return (msb ? 1.0 : -1.0) * (lsb ? 512.0 : 1536.0);
  endfunction
  always @(posedge clk) if (rst_n && sym_valid) begin
    for (int k = 0; k < NSC; k++) begin
      int ar, ai, er, ei;
      ar = sym_data[k].re < 0 ? -int'(sym_data[k].re) : int'(sym_data[k].re);
      ai = sym_data[k].im < 0 ? -int'(sym_data[k].im) : int'(sym_data[k].im);
      er = ar < 1024 ? ar - 512 : ar - 1536;
      ei = ai < 1024 ? ai - 512 : ai - 1536;
      checks++;
      if (er > 77 || er < -77 || ei > 77 || ei < -77) begin
        failures++; if (failures < 3) $display("FAIL: symbol %0d,%0d off the grid at %0t", sym_data[k].re, sym_data[k].im, $time);
      end
    end
  end
  initial begin
    bit a [GOLAY_L], b [GOLAY_L], na [GOLAY_L], nb [GOLAY_L];
    int len, m, nblk;
    logic [18:0] lf;
    real tr [NSC], ti [NSC], dr [NSC], di [NSC];
    train_bits_t tbits;
    tbits = train_bits();
    a[0] = 1; b[0] = 1; len = 1;
    while (len < GOLAY_L) begin
      for (int i = 0; i < len; i++) begin na[i] = a[i]; na[len+i] = b[i]; nb[i] = a[i]; nb[len+i] = !b[i]; end
      a = na; b = nb; len *= 2;
    end
    for (int n = 0; n < NSC; n++) begin
      tr[n] = 0.0; ti[n] = 0.0;
      for (int k = 0; k < NSC; k++) begin
        real qr, qi, c, sn;
        qr = tbits[2*k] ? -1.0 : 1.0;
        qi = tbits[2*k+1] ? -1.0 : 1.0;
        c = $cos(2.0 * PI * k * n / NSC); sn = $sin(2.0 * PI * k * n / NSC);
        tr[n] += real'(DTRAIN) / 8.0 * (qr * c - qi * sn);
        ti[n] += real'(DTRAIN) / 8.0 * (qr * sn + qi * c);
      end
    end
    for (int n = 0; n < NSYM; n++) begin sre[n] = 0.0; sim[n] = 0.0; end
    lf = 19'h2B3C1;
    m = LEAD;
    for (int f = 0; f < 2; f++) begin
      for (int t = 0; t < GOLAY_L; t++) begin sre[m] = a[t] ? 1024.0 : -1024.0; m++; end
      for (int t = 0; t < GOLAY_L; t++) begin sre[m] = b[t] ? 1024.0 : -1024.0; m++; end
      for (int blk = 0; blk < NTRAIN + NDATA; blk++) begin
        if (blk < NTRAIN) begin
          dr = tr; di = ti;
        end else begin
          for (int k = 0; k < NSC; k++) begin
            bit bb [4];
            for (int q = 0; q < 4; q++) begin
              bb[q] = lf[18] ^ lf[17] ^ lf[16] ^ lf[13];
              lf = {lf[17:0], bb[q]};
            end
            dr[k] = lvl(bb[0], bb[1]);
            di[k] = lvl(bb[2], bb[3]);
          end
        end
        for (int t = 0; t < NCP; t++) begin sre[m] = dr[NSC-NCP+t]; sim[m] = di[NSC-NCP+t]; m++; end
        for (int t = 0; t < NSC; t++) begin sre[m] = dr[t]; sim[m] = di[t]; m++; end
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    nblk = 0;
    fork
      for (int c = 0; c < NSYM / 4; c++) begin
        @(negedge clk);
        in_valid = 1;
        for (int i = 0; i < SB_LANES; i++) begin
          int n;
          n = 4 * c + i / 2;
          in_data[i].re = 16'($rtoi(HR * sre[n] - HI * sim[n]));
          in_data[i].im = 16'($rtoi(HR * sim[n] + HI * sre[n]));
        end
      end
      forever begin
        @(posedge clk);
        if (sym_valid) nblk++;
      end
    join_any
    @(negedge clk) in_valid = 0;
    repeat (100) @(negedge clk);
    checks += 6;
    if (n_detect != 2) begin failures++; $display("FAIL: %0d preambles", n_detect); end
    if (!trained) begin failures++; $display("FAIL: not trained"); end
    if (nblk != 2 * NDATA) begin failures++; $display("FAIL: %0d data blocks", nblk); end
    if (!ber_synced) begin failures++; $display("FAIL: BER not synced"); end
    if (ber_errs != 0) begin failures++; $display("FAIL: %0d bit errors", ber_errs); end
    if (ber_bits < 48'(4 * NSC * 2 * (int'(NDATA) - 2))) begin failures++; $display("FAIL: only %0d bits compared", ber_bits); end
    $display("subband_processor: blocks %0d bits %0d errors %0d", nblk, ber_bits, ber_errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
