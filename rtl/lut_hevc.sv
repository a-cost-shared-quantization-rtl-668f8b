// lut_hevc -- HEVC multiplication-factor table.
//
// HEVC uses one factor per value of QP mod 6 for every position of the block
// (26214, 23302, 20560, 18396, 16384, 14564); QP / 6 only changes the shift.
// Synchronous ROM: when `en` is high the factor of `qp_m` is loaded into the
// output register, otherwise it holds.
//
// Timing: index and enable in cycle t, factor on `mf` in cycle t+1.
// Factors follow the published table; the enable form is this design's choice.
module lut_hevc
  import dfqa_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [2:0] qp_m,   // QP mod 6, 0..5
  output mf_t        mf
);
  always_ff @(posedge clk) begin
    if (en) mf <= (qp_m < 3'd6) ? HEVC_MF[qp_m] : '0;
  end
endmodule
