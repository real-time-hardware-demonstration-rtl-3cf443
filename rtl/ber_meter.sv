// ber_meter: self-synchronising PRBS19 bit-error meter.
//
// The payload is a PRBS19 stream, b[n] = b[n-14]^b[n-17]^b[n-18]^b[n-19]
// (polynomial x^19+x^5+x^2+x+1). On the first data block of a frame
// (in_first) the meter loads its reference generator from the first 19
// received bits; from then on every received bit is compared with the
// generator's prediction, which runs on its own (errors do not propagate).
// NB bits arrive per block (one block per clock at most); bits_cnt counts
// compared bits and err_cnt the mismatches. Blocks before the first sync
// are ignored. Counters update one clock after the block. A BER meter on
// PRBS19 data follows the design description; the polynomial, the bit
// order and the per-frame resynchronisation are this implementation's.
module ber_meter #(
  parameter int NB = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [NB-1:0] in_bits,      // index 0 first in time
  input  logic          in_first,
  output logic [47:0]   bits_cnt,
  output logic [47:0]   err_cnt,
  output logic          synced
);
  logic [18:0] hist_q;   // hist_q[i] = reference bit n-1-i

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q   <= '0;
      bits_cnt <= '0;
      err_cnt  <= '0;
      synced   <= 1'b0;
    end else if (in_valid && (synced || in_first)) begin
      logic [18:0] h;
      logic [47:0] nb, ne;
      logic        r;
      h = hist_q; nb = '0; ne = '0;
      for (int i = 0; i < NB; i++) begin
        if (in_first && i < 19) begin
          r = in_bits[i];
        end else begin
          r  = h[13] ^ h[16] ^ h[17] ^ h[18];
          nb = nb + 48'd1;
          ne = ne + 48'(r != in_bits[i]);
        end
        h = {h[17:0], r};
      end
      hist_q   <= h;
      bits_cnt <= bits_cnt + nb;
      err_cnt  <= err_cnt + ne;
      synced   <= 1'b1;
    end
  end
endmodule
