// iq_imbalance_corr: IQ gain/phase imbalance correction of the ADC samples.
//
// For each of the LANES parallel samples of one polarization the corrected
// sample is I' = c_ii*I and Q' = c_qi*I + c_qq*Q (a Gram-Schmidt style
// correction: c_qi removes the part of I that leaked into Q through the
// phase error, c_qq restores the Q gain). Coefficients are Q2.14 and come
// from a host that calibrates the front end at bring-up. The result is
// scaled so that ADC full scale becomes +-2^(SW-3). One clock of latency,
// one vector per clock. The correction and where it sits (before the filter
// bank) follow the design description; the correction form, the coefficient
// format and the ADC width are choices of this implementation.
module iq_imbalance_corr
  import dfts_pkg::*;
#(
  parameter int LANES_P = LANES,
  parameter int ADC_W   = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ADC_W-1:0] i_in [LANES_P],
  input  logic signed [ADC_W-1:0] q_in [LANES_P],
  input  logic signed [15:0]      c_ii,
  input  logic signed [15:0]      c_qi,
  input  logic signed [15:0]      c_qq,
  output logic                    out_valid,
  output cplx_t                   out_data [LANES_P]
);
  localparam int SH = ADC_W + 16 - SW;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES_P; l++) begin
      logic signed [47:0] pi, pq;
      pi = 48'(c_ii) * 48'(i_in[l]);
      pq = 48'(c_qi) * 48'(i_in[l]) + 48'(c_qq) * 48'(q_in[l]);
      out_data[l].re <= sat(pi >>> SH);
      out_data[l].im <= sat(pq >>> SH);
    end
  end
endmodule
