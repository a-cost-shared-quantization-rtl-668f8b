// multi_quant_top -- cost-shared, division-free 8x8 quantizer for H.264/AVC,
// AVS, VC-1, MPEG-2/4, MJPEG and HEVC.
//
// Transform coefficients of 8x8 blocks stream in row-major order, one per
// cycle when `in_valid` is high. The standard of a block is chosen on the
// 3-bit `select_standard` pin (0 H.264, 1 AVS, 2 VC-1, 3 MPEG-2/4, 4 MJPEG,
// 5 HEVC), together with the QP and, for H.264, the rounding offset f; these
// are sampled with the first coefficient of each block and held to its end.
//
// Four pipeline stages, one shared datapath:
//   1  row-column generator addresses the tables; the controller registers
//      the coefficient's tag and enables the one table of its standard
//   2  the table output registers load, MUX2 selects the factor MF; the
//      parameter decoder's r, offset, qbits and shift are registered
//   3  (w << r) * MF on the shared multiplier, offset << qbits on the shifter
//   4  sum, arithmetic right shift by n + qs_bit, output register
// A coefficient accepted in cycle t leaves in cycle t+4 with its row, column,
// standard and an end-of-block flag; one level per cycle thereafter.
//
// Parameters: W_W is the width of the signed coefficient and of the level;
// BIT_DEPTH (8 or 10) enters the HEVC shifts. The stage split, the shared
// multiplier/adder/shifter and the tables follow the published architecture;
// the port list, widths, standard codes and per-block latching are this
// design's choices.
module multi_quant_top
  import dfqa_pkg::*;
#(
  parameter int unsigned W_W       = 20,
  parameter int unsigned BIT_DEPTH = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [W_W-1:0] in_w,             // transform coefficient
  input  logic [2:0]            select_standard,
  input  logic [QP_W-1:0]       qp,
  input  logic [OFS_FB-1:0]     h264_f,           // f * 2^16, 0 .. 0.5
  output logic                  out_valid,
  output logic signed [W_W-1:0] out_y,            // quantized level
  output logic [2:0]            out_row,
  output logic [2:0]            out_col,
  output logic [2:0]            out_std,
  output logic                  out_last,         // level (7,7) of a block
  output logic                  out_err,          // block had an unused standard code
  output logic                  busy
);
  logic [2:0]            rc_row, rc_col;
  logic                  rc_first, rc_last, rc_adv, rc_clear;
  logic [NUM_LUTS-1:0]   lut_en;
  lut_sel_e              lut_sel;
  tag_t                  s1_tag, s4_tag;
  mf_t                   mf_s2;
  qparam_t               prm_s1, prm_s2;
  logic signed [W_W-1:0] w_s1, w_s2;

  row_col_gen u_rcg (
    .clk, .rst_n, .adv(rc_adv), .clear(rc_clear),
    .row(rc_row), .col(rc_col), .first(rc_first), .last(rc_last)
  );

  quant_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_std(select_standard), .in_qp(qp), .in_f(h264_f),
    .rc_row, .rc_col, .rc_last, .rc_adv, .rc_clear,
    .lut_en, .lut_sel, .s1_tag, .s4_tag, .busy
  );

  mf_lut_bank u_luts (
    .clk, .rst_n, .lut_en, .lut_sel, .qp(s1_tag.qp),
    .row(s1_tag.row), .col(s1_tag.col), .mf(mf_s2)
  );

  qp_proc #(.BIT_DEPTH(BIT_DEPTH)) u_qpp (
    .standard(s1_tag.standard), .qp(s1_tag.qp), .h264_f(s1_tag.h264_f), .prm(prm_s1)
  );

  // Coefficient and parameter pipeline registers (stages 1 and 2).
  always_ff @(posedge clk) begin
    w_s1   <= in_w;
    w_s2   <= w_s1;
    prm_s2 <= s1_tag.err ? '0 : prm_s1;
  end

  quant_core #(.W_W(W_W)) u_core (
    .clk, .w(w_s2), .mf(mf_s2), .prm(prm_s2), .y(out_y)
  );

  assign out_valid = s4_tag.valid;
  assign out_row   = s4_tag.row;
  assign out_col   = s4_tag.col;
  assign out_std   = s4_tag.standard;
  assign out_last  = s4_tag.last;
  assign out_err   = s4_tag.err;

  // The first coefficient of a block always finds the generator at (0,0).
  a_block_align: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !busy) |-> rc_first);
endmodule
