// block_aligner: cyclic-prefix removal and block framing of the symbol
// stream.
//
// After the preamble mark from golay_timing, the stream is cut into blocks
// of NCP+NSC symbols; the first NCP (the cyclic prefix) are dropped and the
// NSC remaining symbols are collected and handed on as one vector, with
// out_train set for the NTRAIN training blocks at the start of the frame and
// out_first for the first data block. After NTRAIN+NDATA blocks the unit
// waits for the next mark. The block window is placed ADVANCE symbols early,
// inside the cyclic prefix, so that a timing estimate a few symbols late
// still sees no inter-block interference; the resulting cyclic shift is a
// linear phase over the sub-carriers that the equalizer absorbs. Block boundaries may fall anywhere inside the
// SYM_LANES symbols of a clock; lanes are processed in order. The block is
// output the clock after its last symbol arrives. The 64-symbol blocks and
// the 8-symbol prefix follow the design description (the prefix is counted
// in sub-band symbols); the frame layout is this implementation's choice.
module block_aligner
  import dfts_pkg::*;
#(
  parameter int NTR = NTRAIN,
  parameter int NDA = NDATA,
  parameter int ADVANCE = NCP / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in_data [SYM_LANES],
  input  logic [SYM_LANES-1:0] in_mark,
  output logic                 out_valid,
  output cplx_t                out_data [NSC],
  output logic                 out_train,
  output logic                 out_first
);
  localparam int BLK = NSC + NCP;

  cplx_t       buf_q [NSC];
  logic        act_q;
  logic [7:0]  pos_q;
  logic [15:0] blk_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q <= 1'b0;
      pos_q <= '0;
      blk_q <= '0;
      out_valid <= 1'b0;
      out_train <= 1'b0;
      out_first <= 1'b0;
    end else begin
      logic        act, emit, tr, fi;
      logic [7:0]  pos;
      logic [15:0] blk;
      act = act_q; pos = pos_q; blk = blk_q;
      emit = 1'b0; tr = 1'b0; fi = 1'b0;
      if (in_valid) begin
        for (int i = 0; i < SYM_LANES; i++) begin
          if (in_mark[i]) begin
            act = 1'b1; pos = 8'(ADVANCE); blk = '0;
          end else if (act) begin
            if (pos == 8'(BLK - 1)) begin
              emit = 1'b1;
              tr   = blk < 16'(NTR);
              fi   = blk == 16'(NTR);
              pos  = '0;
              blk  = blk + 16'd1;
              if (blk == 16'(NTR + NDA)) act = 1'b0;
            end else begin
              pos = pos + 8'd1;
            end
          end
        end
      end
      act_q <= act; pos_q <= pos; blk_q <= blk;
      out_valid <= emit;
      out_train <= tr;
      out_first <= fi;
    end
  end

  // data path: write every in-block symbol at its place
  always_ff @(posedge clk) begin
    logic       act;
    logic [7:0] pos;
    cplx_t      b [NSC];
    act = act_q; pos = pos_q;
    b = buf_q;
    if (in_valid) begin
      for (int i = 0; i < SYM_LANES; i++) begin
        if (in_mark[i]) begin
          act = 1'b1; pos = 8'(ADVANCE);
        end else if (act) begin
          if (pos >= 8'(NCP)) b[$clog2(NSC)'(pos - 8'(NCP))] = in_data[i];
          if (pos == 8'(BLK - 1)) begin
            out_data <= b;
            pos = '0;
          end else begin
            pos = pos + 8'd1;
          end
        end
      end
    end
    buf_q <= b;
  end
endmodule
