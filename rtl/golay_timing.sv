// golay_timing: frame timing recovery on a Golay complementary pair.
//
// Each frame starts with the preamble Ga,Gb: two complementary +-1
// sequences of L symbols. For every symbol position n (SYM_LANES per clock)
// the unit correlates the last 2L symbols with the concatenation Ga|Gb,
// using only additions and subtractions, and forms the metric
// |Ca(n)+Cb(n)|^2. Because the aperiodic autocorrelations of a complementary
// pair add up to a single peak, the metric peaks where n is the last
// preamble symbol. Search: the first metric above `thr` opens a window of L
// symbols in which the largest metric is taken as the peak; the unit then
// ignores HOLDOFF symbols (one frame minus L) before searching again. The
// symbol stream is passed on delayed by DLY clocks, with out_mark set on the
// last preamble symbol. Metrics of the first WARMUP clocks after reset are
// ignored. Latency DLY clocks. Timing on Golay sequences
// follows the design description; the preamble layout, L, the threshold
// search and the metric are this implementation's choices.
module golay_timing
  import dfts_pkg::*;
#(
  parameter int L       = GOLAY_L,
  parameter int HOLDOFF = 2 * GOLAY_L + (NTRAIN + NDATA) * (NSC + NCP) - GOLAY_L
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  cplx_t             in_data  [SYM_LANES],
  input  logic [47:0]       thr,
  output logic              out_valid,
  output cplx_t             out_data [SYM_LANES],
  output logic [SYM_LANES-1:0] out_mark,
  output logic [15:0]       n_detect        // number of preambles found
);
  localparam int BL  = 2 * L + SYM_LANES - 1;
  localparam int DLY = L / SYM_LANES + 4;
  // clocks after reset before metrics are trusted: the correlator window and
  // the upstream pipelines must first be filled with valid samples
  localparam int WARMUP = 2 * BL / SYM_LANES + 8;
  localparam logic [L-1:0] GA = golay_seq(1'b0);
  localparam logic [L-1:0] GB = golay_seq(1'b1);

  typedef enum logic [1:0] {SEARCH, PEAK, HOLD} state_t;

  cplx_t buf_q [BL];
  cplx_t nb    [BL];
  logic [47:0] met_q [SYM_LANES];
  logic        met_vld_q;
  logic [15:0] cnt_q;          // clock counter, tags the metrics
  logic        warm_q;

  always_comb begin
    for (int p = 0; p < BL - SYM_LANES; p++) nb[p] = buf_q[p + SYM_LANES];
    for (int i = 0; i < SYM_LANES; i++) nb[BL - SYM_LANES + i] = in_data[i];
  end

  always_ff @(posedge clk) begin
    if (in_valid) buf_q <= nb;
    for (int i = 0; i < SYM_LANES; i++) begin
      logic signed [31:0] cr, ci;
      logic signed [47:0] m;
      int p0;
      p0 = BL - SYM_LANES + i - 2 * L + 1;
      cr = '0;
      ci = '0;
      for (int t = 0; t < L; t++) begin
        if (GA[t]) begin cr += 32'(nb[p0 + t].re); ci += 32'(nb[p0 + t].im); end
        else       begin cr -= 32'(nb[p0 + t].re); ci -= 32'(nb[p0 + t].im); end
        if (GB[t]) begin cr += 32'(nb[p0 + L + t].re); ci += 32'(nb[p0 + L + t].im); end
        else       begin cr -= 32'(nb[p0 + L + t].re); ci -= 32'(nb[p0 + L + t].im); end
      end
      m = 48'(cr) * 48'(cr) + 48'(ci) * 48'(ci);
      met_q[i] <= m;
    end
  end

  // peak search
  state_t      st_q;
  logic [47:0] best_q;
  logic [15:0] best_clk_q;
  logic [$clog2(SYM_LANES)-1:0] best_lane_q;
  logic [31:0] left_q;
  logic        found_q;     // a peak is waiting to be marked in the delayed stream

  // delayed stream with clock tags
  cplx_t       d_data [DLY][SYM_LANES];
  logic [15:0] d_tag  [DLY];
  logic        d_vld  [DLY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      met_vld_q <= 1'b0;
      cnt_q     <= '0;
      warm_q    <= 1'b0;
      st_q      <= SEARCH;
      best_q    <= '0;
      best_clk_q <= '0;
      best_lane_q <= '0;
      left_q    <= '0;
      found_q   <= 1'b0;
      n_detect  <= '0;
      for (int k = 0; k < DLY; k++) begin d_vld[k] <= 1'b0; d_tag[k] <= '0; end
      out_valid <= 1'b0;
      out_mark  <= '0;
    end else begin
      state_t      st;
      logic [47:0] best;
      logic [15:0] bclk;
      logic [$clog2(SYM_LANES)-1:0] blane;
      logic [31:0] left;
      logic        fnd;
      met_vld_q <= in_valid;
      if (in_valid) cnt_q <= cnt_q + 16'd1;
      if (cnt_q == 16'(WARMUP)) warm_q <= 1'b1;
      st = st_q; best = best_q; bclk = best_clk_q; blane = best_lane_q;
      left = left_q; fnd = found_q;
      if (met_vld_q && warm_q) begin
        for (int i = 0; i < SYM_LANES; i++) begin
          case (st)
            SEARCH: if (met_q[i] > thr) begin
              st = PEAK; best = met_q[i]; bclk = cnt_q - 16'd1;
              blane = ($clog2(SYM_LANES))'(i); left = 32'(L - 1);
            end
            PEAK: begin
              if (met_q[i] > best) begin
                best = met_q[i]; bclk = cnt_q - 16'd1; blane = ($clog2(SYM_LANES))'(i);
              end
              left = left - 1;
              if (left == 0) begin
                st = HOLD; fnd = 1'b1;
                left = 32'(HOLDOFF) - 32'(L);
              end
            end
            default: begin
              left = left - 1;
              if (left == 0) st = SEARCH;
            end
          endcase
        end
      end
      // delayed stream; tag = clock count of the metric's symbols
      d_vld[0] <= in_valid;
      d_tag[0] <= cnt_q;
      for (int k = 1; k < DLY; k++) begin d_vld[k] <= d_vld[k-1]; d_tag[k] <= d_tag[k-1]; end
      out_valid <= d_vld[DLY-1];
      out_mark  <= '0;
      if (fnd && d_vld[DLY-1] && d_tag[DLY-1] == bclk) begin
        out_mark[blane] <= 1'b1;
        fnd = 1'b0;
        n_detect <= n_detect + 16'd1;
      end
      st_q <= st; best_q <= best; best_clk_q <= bclk; best_lane_q <= blane;
      left_q <= left; found_q <= fnd;
    end
  end

  always_ff @(posedge clk) begin
    d_data[0] <= in_data;
    for (int k = 1; k < DLY; k++) d_data[k] <= d_data[k-1];
    out_data <= d_data[DLY-1];
  end
endmodule
