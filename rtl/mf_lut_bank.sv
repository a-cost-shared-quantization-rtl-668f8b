// mf_lut_bank -- all multiplication-factor tables plus MUX2.
//
// Holds the five tables (H.264 with its six sub-tables, AVS, VC-1/MPEG-2/4,
// MJPEG, HEVC). The controller raises exactly one bit of `lut_en`, so only the
// table of the selected standard reads; the others keep their output register
// unchanged. MUX2 then passes the factor of the table named by `lut_sel`,
// registered in the same cycle as the table outputs. LUT_NONE gives zero.
//
// Timing: address, enables and select in cycle t (pipeline stage 1), factor
// on `mf` in cycle t+1 (stage 2). The arrangement (one table per standard,
// MUX1 inside the H.264 table, one enable per table and MUX2) follows the
// published architecture; the encodings are this design's choices.
module mf_lut_bank
  import dfqa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_LUTS-1:0] lut_en,   // one-hot, index = lut_sel_e value
  input  lut_sel_e            lut_sel,
  input  logic [QP_W-1:0]     qp,
  input  logic [2:0]          row,
  input  logic [2:0]          col,
  output mf_t                 mf
);
  mf_t        mf_h264, mf_avs, mf_vcmp, mf_jpeg, mf_hevc;
  lut_sel_e   sel_q;
  logic [2:0] qp_m;

  assign qp_m = qp_mod6(qp);

  lut_h264     u_h264 (.clk, .en(lut_en[LUT_H264]), .qp_m, .row, .col, .mf(mf_h264));
  lut_avs      u_avs  (.clk, .en(lut_en[LUT_AVS]),  .qp,   .mf(mf_avs));
  lut_vc1_mpeg u_vcmp (.clk, .en(lut_en[LUT_VCMP]), .row, .col, .mf(mf_vcmp));
  lut_mjpeg    u_jpeg (.clk, .en(lut_en[LUT_JPEG]), .row, .col, .mf(mf_jpeg));
  lut_hevc     u_hevc (.clk, .en(lut_en[LUT_HEVC]), .qp_m, .mf(mf_hevc));

  always_ff @(posedge clk) begin
    if (!rst_n) sel_q <= LUT_NONE;
    else        sel_q <= lut_sel;
  end

  // MUX2
  always_comb begin
    unique case (sel_q)
      LUT_H264: mf = mf_h264;
      LUT_AVS:  mf = mf_avs;
      LUT_VCMP: mf = mf_vcmp;
      LUT_JPEG: mf = mf_jpeg;
      LUT_HEVC: mf = mf_hevc;
      default:  mf = '0;
    endcase
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(lut_en));
endmodule
