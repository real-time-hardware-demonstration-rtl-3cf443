// tb_ber_meter: a PRBS19 stream (b[n] = b[n-19]^b[n-18]^b[n-17]^b[n-14],
// generated here) is cut into 256-bit blocks. Block 0 is garbage and must be
// ignored (no sync yet); block 1 carries in_first; then 6 more blocks. A
// known number of bits is flipped outside the 19 seed bits. The meter must
// count exactly 7*256-19 compared bits and exactly the flipped bits as
// errors, one clock after the last block.
`timescale 1ns/1ps
module tb_ber_meter;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, synced;
  logic [255:0] in_bits;
  logic [47:0] bits_cnt, err_cnt;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  ber_meter #(.NB(256)) dut (.*);
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [18:0] lf;
    int nerr;
    lf = 19'h5A5A5;
    nerr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_bits = {8{32'hDEADBEEF}};
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (bits_cnt != 0 || synced) begin failures++; $display("FAIL: counted before sync"); end
    for (int b = 0; b < 7; b++) begin
      for (int i = 0; i < 256; i++) begin
        in_bits[i] = lf[18] ^ lf[17] ^ lf[16] ^ lf[13];
        lf = {lf[17:0], in_bits[i]};
      end
      if (b > 0 || 1) begin
        for (int e = 0; e < b; e++) begin
          int pos;
          pos = 19 + 36 * e + $urandom_range(0, 35);
          if (b == 0) pos = 100;
          in_bits[pos] = ~in_bits[pos];
          nerr++;
        end
      end
      in_valid = 1; in_first = (b == 0);
      @(negedge clk);
      in_valid = 0; in_first = 0;
    end
    checks += 2;
    if (bits_cnt != 48'(7 * 256 - 19)) begin failures++; $display("FAIL: bits %0d", bits_cnt); end
    if (err_cnt != 48'(nerr)) begin failures++; $display("FAIL: errors %0d expected %0d", err_cnt, nerr); end
    checks++;
    if (!synced) begin failures++; $display("FAIL: not synced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
