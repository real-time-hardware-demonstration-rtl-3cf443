// subband_processor: demodulator of one DFT-S OFDM sub-band.
//
// Chain: decim2 (2 -> 1 sample per symbol, 4 symbols per clock) ->
// golay_timing (frame start) -> block_aligner (drop the cyclic prefix, 64-
// symbol blocks) -> 64-point FFT (undoes the DFT spreading's OFDM part:
// gives the sub-carriers) -> lms_equalizer (trained once per frame) ->
// 64-point IFFT (DFT-S de-spreading back to single-carrier symbols) ->
// qam16_slicer -> ber_meter. Both transforms halve the data in three of
// their six stages, so the pair is gain-neutral. Control flags travel with
// the blocks through the transforms in matching delay lines. Throughput is
// one 72-symbol block per 18 clocks; block latency from the last symbol of
// a block to its bits is 1+6+1+6+1 clocks. The chain follows the design
// description's list of sub-band functions; the frame layout and word
// widths are this implementation's choices.
module subband_processor
  import dfts_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cplx_t            in_data [SB_LANES],
  input  logic             dec_phase,
  input  logic [47:0]      thr,
  output logic             sym_valid,
  output cplx_t            sym_data [NSC],     // de-spread symbols
  output logic             bits_valid,
  output logic [4*NSC-1:0] bits,
  output logic [47:0]      ber_bits,
  output logic [47:0]      ber_errs,
  output logic             ber_synced,
  output logic [15:0]      n_detect,
  output logic             trained
);
  localparam int FD = $clog2(NSC);

  logic  d_vld;
  cplx_t d_sym [SYM_LANES];
  decim2 u_dec (.clk, .rst_n, .phase(dec_phase), .in_valid, .in_data,
                .out_valid(d_vld), .out_data(d_sym));

  logic  t_vld;
  cplx_t t_sym [SYM_LANES];
  logic [SYM_LANES-1:0] t_mark;
  golay_timing u_tim (.clk, .rst_n, .in_valid(d_vld), .in_data(d_sym), .thr,
                      .out_valid(t_vld), .out_data(t_sym), .out_mark(t_mark), .n_detect);

  logic  b_vld, b_train, b_first;
  cplx_t b_blk [NSC];
  block_aligner u_blk (.clk, .rst_n, .in_valid(t_vld), .in_data(t_sym), .in_mark(t_mark),
                       .out_valid(b_vld), .out_data(b_blk), .out_train(b_train), .out_first(b_first));

  logic  f_vld;
  cplx_t f_blk [NSC];
  fft_radix2 #(.N(NSC), .INV(1'b0), .SCALE_MASK(32'h15)) u_fft (
    .clk, .rst_n, .in_valid(b_vld), .in_data(b_blk), .out_valid(f_vld), .out_data(f_blk));

  logic [FD-1:0] tr_d, fi_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin tr_d <= '0; fi_d <= '0; end
    else begin
      tr_d <= {tr_d[FD-2:0], b_vld & b_train};
      fi_d <= {fi_d[FD-2:0], b_vld & b_first};
    end
  end

  logic  e_vld, e_first;
  cplx_t e_blk [NSC];
  lms_equalizer u_eq (.clk, .rst_n, .in_valid(f_vld), .in_data(f_blk), .in_train(tr_d[FD-1]),
                      .in_first(fi_d[FD-1]), .out_valid(e_vld), .out_data(e_blk),
                      .out_first(e_first), .trained);

  fft_radix2 #(.N(NSC), .INV(1'b1), .SCALE_MASK(32'h2A)) u_ifft (
    .clk, .rst_n, .in_valid(e_vld), .in_data(e_blk), .out_valid(sym_valid), .out_data(sym_data));

  logic [FD-1:0] fi2_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fi2_d <= '0;
    else        fi2_d <= {fi2_d[FD-2:0], e_first};
  end

  logic s_first;
  qam16_slicer u_slc (.clk, .rst_n, .in_valid(sym_valid), .in_data(sym_data), .in_first(fi2_d[FD-1]),
                      .out_valid(bits_valid), .out_bits(bits), .out_first(s_first));

  ber_meter #(.NB(4 * NSC)) u_ber (.clk, .rst_n, .in_valid(bits_valid), .in_bits(bits),
                                   .in_first(s_first), .bits_cnt(ber_bits), .err_cnt(ber_errs),
                                   .synced(ber_synced));
endmodule
