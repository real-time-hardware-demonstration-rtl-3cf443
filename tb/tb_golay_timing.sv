// tb_golay_timing: random QPSK symbols (+-300) with a Golay preamble
// (+-640, built here by the doubling construction) starting at symbol 403
// and again one frame (7264 symbols) later. Checks: out_mark is set on
// exactly the last preamble symbol of each frame, n_detect counts 2, and
// the symbols leave unchanged 12 clocks after they enter.
`timescale 1ns/1ps
module tb_golay_timing;
  import dfts_pkg::*;
  localparam int FRAME = 2 * GOLAY_L + (NTRAIN + NDATA) * (NSC + NCP);
  localparam int P0 = 403;
  localparam int NS = P0 + 2 * FRAME + 200;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t in_data [SYM_LANES], out_data [SYM_LANES];
  logic [SYM_LANES-1:0] out_mark;
  logic [47:0] thr = 48'd600000000;
  logic [15:0] n_detect;
  int checks = 0, failures = 0;
  cplx_t sym [NS];
  always #1 clk = ~clk;
  golay_timing dut (.*);
  initial begin
    repeat (NS / 4 + 500) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit a [GOLAY_L], b [GOLAY_L], na [GOLAY_L], nb [GOLAY_L];
    int len, nout, nmark;
    a[0] = 1; b[0] = 1; len = 1;
    while (len < GOLAY_L) begin
      for (int i = 0; i < len; i++) begin na[i] = a[i]; na[len+i] = b[i]; nb[i] = a[i]; nb[len+i] = !b[i]; end
      a = na; b = nb; len *= 2;
    end
    for (int n = 0; n < NS; n++) begin
      sym[n].re = $urandom_range(0, 1) ? 16'sd300 : -16'sd300;
      sym[n].im = $urandom_range(0, 1) ? 16'sd300 : -16'sd300;
    end
    for (int f = 0; f < 2; f++)
      for (int t = 0; t < GOLAY_L; t++) begin
        sym[P0 + f * FRAME + t].re = a[t] ? 16'sd640 : -16'sd640;  sym[P0 + f * FRAME + t].im = 0;
        sym[P0 + f * FRAME + GOLAY_L + t].re = b[t] ? 16'sd640 : -16'sd640;  sym[P0 + f * FRAME + GOLAY_L + t].im = 0;
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    nout = 0; nmark = 0;
    fork
      begin
        for (int c = 0; c < NS / 4; c++) begin
          @(negedge clk);
          in_valid = 1;
          for (int i = 0; i < 4; i++) in_data[i] = sym[4 * c + i];
        end
        @(negedge clk) in_valid = 0;
      end
      for (int t = 0; t < NS / 4 + 20; t++) begin
        @(posedge clk);
        #0.1;
        if (out_valid) begin
          if (nout == 0) begin
            checks++;
            if (t != 12) begin failures++; $display("FAIL: first output at edge %0d, expected 12", t); end
          end
          for (int i = 0; i < 4; i++) begin
            int n;
            bit em;
            n = 4 * nout + i;
            em = (n == P0 + 2 * GOLAY_L - 1) || (n == P0 + FRAME + 2 * GOLAY_L - 1);
            checks++;
            if (out_data[i] != sym[n]) begin failures++; if (failures < 10) $display("FAIL data %0d", n); end
            if (out_mark[i] != em) begin failures++; $display("FAIL mark at symbol %0d: %0d", n, out_mark[i]); end
            else if (em) begin checks++; nmark++; end
          end
          nout++;
        end
      end
    join
    checks++;
    if (n_detect != 2 || nmark != 2) begin failures++; $display("FAIL: n_detect %0d marks %0d", n_detect, nmark); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
