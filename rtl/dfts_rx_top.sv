// dfts_rx_top: dual-polarization sub-banded DFT-S OFDM receiver.
//
// Each polarization (X, Y) receives LANES = 64 complex ADC samples per
// clock (26.6 GS/s at a 415.625 MHz clock) and runs through
//   iq_imbalance_corr -> filter_bank (16 sub-bands, 8 parallel modules,
//   2 samples per sub-band symbol) -> pilot_cfo_comp (pilot sub-band phase
//   removed from all sub-bands) -> subband_select (any one sub-band) ->
//   subband_processor (timing, CP removal, DFT, LMS, IDFT, slicer, BER).
// The two filter banks are the only full-rate parts; everything after the
// filter bank runs at 8 samples per clock. One sub-band processor per
// polarization is built; more would be identical copies on other
// sub-bands. Both polarizations use the same sub-band selection and the
// same configuration. Input must be continuous (in_valid every clock while
// streaming). The partitioning, rates and functions follow the design
// description; separate per-polarization demodulation (no 2x2 polarization
// demultiplexing) and the configuration ports are this implementation's
// choices.
module dfts_rx_top
  import dfts_pkg::*;
#(
  parameter int ADC_W = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ADC_W-1:0] adc_xi [LANES],
  input  logic signed [ADC_W-1:0] adc_xq [LANES],
  input  logic signed [ADC_W-1:0] adc_yi [LANES],
  input  logic signed [ADC_W-1:0] adc_yq [LANES],
  // IQ correction coefficients (Q2.14), [0] = X, [1] = Y
  input  logic signed [15:0]      c_ii [2],
  input  logic signed [15:0]      c_qi [2],
  input  logic signed [15:0]      c_qq [2],
  input  logic [$clog2(NSUB)-1:0] sb_sel,
  input  logic                    dec_phase,
  input  logic [47:0]             golay_thr,
  // per polarization results, [0] = X, [1] = Y
  output logic signed [15:0]      cfo_phase  [2],
  output logic                    sym_valid  [2],
  output cplx_t                   sym_data   [2][NSC],
  output logic                    bits_valid [2],
  output logic [4*NSC-1:0]        bits       [2],
  output logic [47:0]             ber_bits   [2],
  output logic [47:0]             ber_errs   [2],
  output logic                    ber_synced [2],
  output logic [15:0]             n_detect   [2],
  output logic                    trained    [2]
);
  for (genvar p = 0; p < 2; p++) begin : g_pol
    logic  iq_vld, fb_vld, cf_vld, sel_vld;
    cplx_t iq_data [LANES];
    cplx_t fb_data [NFB][NSUB];
    cplx_t cf_data [NFB][NSUB];
    cplx_t sel_data [SB_LANES];
    logic signed [ADC_W-1:0] ai [LANES];
    logic signed [ADC_W-1:0] aq [LANES];

    always_comb begin
      for (int l = 0; l < LANES; l++) begin
        ai[l] = (p == 0) ? adc_xi[l] : adc_yi[l];
        aq[l] = (p == 0) ? adc_xq[l] : adc_yq[l];
      end
    end

    iq_imbalance_corr #(.LANES_P(LANES), .ADC_W(ADC_W)) u_iq (
      .clk, .rst_n, .in_valid,
      .i_in (ai),
      .q_in (aq),
      .c_ii (c_ii[p]), .c_qi(c_qi[p]), .c_qq(c_qq[p]),
      .out_valid(iq_vld), .out_data(iq_data));

    filter_bank u_fb (.clk, .rst_n, .in_valid(iq_vld), .in_data(iq_data),
                      .out_valid(fb_vld), .out_data(fb_data));

    pilot_cfo_comp u_cfo (.clk, .rst_n, .in_valid(fb_vld), .in_data(fb_data),
                          .out_valid(cf_vld), .out_data(cf_data), .phase(cfo_phase[p]));

    subband_select u_sel (.clk, .rst_n, .sel(sb_sel), .in_valid(cf_vld), .in_data(cf_data),
                          .out_valid(sel_vld), .out_data(sel_data));

    subband_processor u_sbp (
      .clk, .rst_n, .in_valid(sel_vld), .in_data(sel_data), .dec_phase, .thr(golay_thr),
      .sym_valid(sym_valid[p]), .sym_data(sym_data[p]), .bits_valid(bits_valid[p]), .bits(bits[p]),
      .ber_bits(ber_bits[p]), .ber_errs(ber_errs[p]), .ber_synced(ber_synced[p]),
      .n_detect(n_detect[p]), .trained(trained[p]));
  end
endmodule
