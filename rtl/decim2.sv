// decim2: decimation by two from 2 samples per symbol to the symbol rate.
//
// Takes the SB_LANES (8) consecutive sub-band samples of a clock and keeps
// every second one, starting at sample `phase`, giving SYM_LANES (4)
// symbols per clock. Sub-symbol timing errors left by this choice appear
// as a linear phase over the sub-carriers and are removed by the
// frequency-domain equalizer. One clock of latency. The factor-2 decimation
// follows the design description; plain sample selection (no extra
// filter, the filter-bank prototype limits the band) is this
// implementation's choice.
module decim2
  import dfts_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  phase,
  input  logic  in_valid,
  input  cplx_t in_data  [SB_LANES],
  output logic  out_valid,
  output cplx_t out_data [SYM_LANES]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
  always_ff @(posedge clk)
    for (int i = 0; i < SYM_LANES; i++) out_data[i] <= in_data[2 * i + int'(phase)];
endmodule
