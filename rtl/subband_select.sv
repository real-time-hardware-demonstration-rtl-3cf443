// subband_select: connects one of the NSUB filter-bank outputs to the
// sub-band processor.
//
// The sub-band processor can be attached to any sub-band at run time; sel
// picks the sub-band (FFT order, 0 = channel centre) and the 8 time samples
// of that sub-band are registered out. A change of sel takes effect on the
// next clock. One clock of latency. The switchable connection follows the
// design description; the registered multiplexer is this implementation's.
module subband_select
  import dfts_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NSUB)-1:0] sel,
  input  logic                    in_valid,
  input  cplx_t                   in_data  [NFB][NSUB],
  output logic                    out_valid,
  output cplx_t                   out_data [NFB]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
  always_ff @(posedge clk)
    for (int j = 0; j < NFB; j++) out_data[j] <= in_data[j][sel];
endmodule
