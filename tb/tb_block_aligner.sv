// tb_block_aligner: symbols numbered by their index enter 4 per clock, with
// the preamble mark on symbol 101 (lane 1). With NTR=1 and NDA=3 the
// aligner must deliver exactly 4 blocks; block b must hold symbols
// 102 + 72b + (8-4) ... +63 (cyclic prefix dropped, window advanced by 4),
// with out_train on block 0 and out_first on block 1, on the clock edge that
// its last symbol arrives (registered at that same edge).
`timescale 1ns/1ps
module tb_block_aligner;
  import dfts_pkg::*;
  localparam int MARK = 101;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_train, out_first;
  cplx_t in_data [SYM_LANES];
  logic [SYM_LANES-1:0] in_mark;
  cplx_t out_data [NSC];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  block_aligner #(.NTR(1), .NDA(3)) dut (.*);
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int nblk;
    repeat (2) @(posedge clk);
    rst_n = 1;
    nblk = 0;
    fork
      begin
        for (int c = 0; c < 200; c++) begin
          @(negedge clk);
          in_valid = 1;
          for (int i = 0; i < 4; i++) begin
            in_data[i].re = 16'(4 * c + i);
            in_data[i].im = 16'(-(4 * c + i));
            in_mark[i] = (4 * c + i == MARK);
          end
        end
        @(negedge clk) in_valid = 0;
      end
      for (int t = 0; t < 205; t++) begin
        @(posedge clk);
        #0.1;
        if (out_valid) begin
          int first, last;
          first = MARK + 1 + 72 * nblk + NCP - 4;
          last  = first + NSC - 1;
          checks++;
          if (t != last / 4) begin failures++; $display("FAIL: block %0d out at edge %0d, last symbol in clock %0d", nblk, t, last / 4); end
          for (int i = 0; i < NSC; i++) begin
            checks++;
            if (out_data[i].re != 16'(first + i) || out_data[i].im != 16'(-(first + i))) begin
              failures++; if (failures < 10) $display("FAIL block %0d sym %0d got %0d exp %0d", nblk, i, out_data[i].re, first + i);
            end
          end
          checks++;
          if (out_train != (nblk == 0) || out_first != (nblk == 1)) begin failures++; $display("FAIL flags block %0d", nblk); end
          nblk++;
        end
      end
    join
    checks++;
    if (nblk != 4) begin failures++; $display("FAIL: %0d blocks", nblk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
