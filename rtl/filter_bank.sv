// filter_bank: 16-channel twice-under-decimated analysis filter bank for
// 64 samples per clock.
//
// Every clock brings LANES (64) consecutive complex samples; NFB (8)
// fb_module instances work side by side, module j producing the sub-band
// samples whose newest input sample is lane 8j of this clock. Their windows
// reach TAPS-1 samples back, so the previous clock's vector is kept in a
// register. Output: 8 consecutive samples (index j = time) of each of the
// 16 sub-bands per clock, at 2 samples per sub-band symbol. Latency 1 +
// log2(16) clocks. The 8 time-parallel modules, the factor-8 decimation and
// the 64-fold slow-down follow the design description; input must be
// continuous (in_valid every clock once streaming).
module filter_bank
  import dfts_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data  [LANES],
  output logic  out_valid,
  output cplx_t out_data [NFB][NSUB]    // [time][sub-band]
);
  cplx_t prev_q [LANES];
  logic  vld [NFB];

  always_ff @(posedge clk) if (in_valid) prev_q <= in_data;

  for (genvar j = 0; j < NFB; j++) begin : g_fb
    cplx_t win [TAPS];
    always_comb begin
      for (int n = 0; n < TAPS; n++) begin
        if (DEC * j - n >= 0) win[n] = in_data[DEC * j - n];
        else                  win[n] = prev_q[LANES + DEC * j - n];
      end
    end
    fb_module #(.ODD(j % 2 == 1)) u_fb (
      .clk, .rst_n,
      .in_valid (in_valid),
      .win      (win),
      .out_valid(vld[j]),
      .sb       (out_data[j])
    );
  end
  assign out_valid = vld[0];
endmodule
