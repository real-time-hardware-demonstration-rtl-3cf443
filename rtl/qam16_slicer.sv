// qam16_slicer: hard 16-QAM decisions.
//
// Each of the NSC equalized, de-spread symbols is decided per axis against
// the thresholds 0 and +-2*UNIT (levels +-UNIT, +-3*UNIT) and mapped to two
// Gray-coded bits per axis: -3 -> 00, -1 -> 01, +1 -> 11, +3 -> 10, i.e.
// msb = (v >= 0), lsb = (|v| < 2*UNIT). Bit order in out_bits, lowest index
// first in time: I msb, I lsb, Q msb, Q lsb of symbol 0, then symbol 1, ...
// One clock of latency. A 16-QAM slicer follows the design description; the
// mapping and scaling are this implementation's choices.
module qam16_slicer
  import dfts_pkg::*;
#(
  parameter int UNIT = QAM_UNIT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cplx_t            in_data [NSC],
  input  logic             in_first,
  output logic             out_valid,
  output logic [4*NSC-1:0] out_bits,
  output logic             out_first
);
  function automatic logic [1:0] dec(input samp_t v);
    logic signed [SW:0] a;
    a = (v < 0) ? -(SW+1)'(v) : (SW+1)'(v);
    return {v >= 0, a < (SW+1)'(2 * UNIT)};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_valid && in_first;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NSC; k++) begin
      logic [1:0] bi, bq;
      bi = dec(in_data[k].re);
      bq = dec(in_data[k].im);
      out_bits[4*k+0] <= bi[1];
      out_bits[4*k+1] <= bi[0];
      out_bits[4*k+2] <= bq[1];
      out_bits[4*k+3] <= bq[0];
    end
  end
endmodule
