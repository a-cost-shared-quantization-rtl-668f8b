// lut_vc1_mpeg -- 8x8 multiplication-factor table shared by VC-1 and MPEG-2/4.
//
// Both standards divide each coefficient by an entry of the 8x8 intra
// quantization matrix qm. The division is replaced by a multiplication with
// MF = round(2^8 / qm(i, j)) followed by a right shift; the 5-bit factors are
// far smaller than qm itself. The non-intra matrix is not held.
// Synchronous ROM addressed by (row, col); the output register loads only when
// `en` is high.
//
// Timing: address and enable in cycle t, factor on `mf` in cycle t+1 (zero-
// extended to the common MF width). Factors follow the published table; the
// enable form is this design's choice.
module lut_vc1_mpeg
  import dfqa_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [2:0] row,
  input  logic [2:0] col,
  output mf_t        mf
);
  mf5_t q;

  always_ff @(posedge clk) begin
    if (en) q <= VCMP_MF[row][col];
  end

  assign mf = mf_t'(q);
endmodule
