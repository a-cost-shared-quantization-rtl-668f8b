// lut_h264 -- H.264 multiplication-factor tables LUT_H_0 .. LUT_H_5 and MUX1.
//
// H.264 uses one 8x8 MF matrix per value of QP mod 6; QP values six apart
// share a matrix and differ only in the shift. Each matrix holds six distinct
// factors, placed by the position class of (row, col): indices 0/4, odd
// indices and 2/6 form three groups, and the pair of groups picks the factor
// (see dfqa_pkg::h264_class). The grouping repeats every four indices, so
// bit 2 of row and col does not affect the factor. Table k is a synchronous
// ROM whose output register loads only when the bank enable is high and QP
// mod 6 equals k; the other five hold their value (sleep). MUX1 then picks
// table `qp_m` using the QP mod 6 registered alongside.
//
// Timing: address and enable in cycle t, factor on `mf` in cycle t+1.
// The factors and their placement follow the published tables; the per-table
// clock enable is this design's way of letting idle tables sleep.
module lut_h264
  import dfqa_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [2:0] qp_m,   // QP mod 6, 0..5
  input  logic [2:0] row,
  input  logic [2:0] col,
  output mf_t        mf
);
  mf_t        tab_q [6];
  logic [2:0] sel_q;
  logic [2:0] cls;

  assign cls = h264_class(row[1:0], col[1:0]);

  for (genvar k = 0; k < 6; k++) begin : g_lut_h
    always_ff @(posedge clk) begin
      if (en && qp_m == 3'(k)) tab_q[k] <= H264_MF[k][cls];
    end
  end

  always_ff @(posedge clk) begin
    if (en) sel_q <= qp_m;
  end

  // MUX1
  always_comb begin
    mf = '0;
    for (int k = 0; k < 6; k++) if (sel_q == 3'(k)) mf = tab_q[k];
  end
endmodule
