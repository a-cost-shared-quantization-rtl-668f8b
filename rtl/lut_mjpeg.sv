// lut_mjpeg -- 8x8 multiplication-factor table for MJPEG luminance.
//
// MJPEG divides each DCT coefficient by an entry of the luminance quantization
// matrix. The division is replaced by a multiplication with
// MF ~ round(2^8 / qm(i, j)) and an 8-bit right shift. Only the luminance
// matrix is held. Synchronous ROM addressed by (row, col); the output register
// loads only when `en` is high.
//
// Timing: address and enable in cycle t, factor on `mf` in cycle t+1 (zero-
// extended to the common MF width). Factors follow the published table; the
// enable form is this design's choice.
module lut_mjpeg
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
    if (en) q <= JPEG_MF[row][col];
  end

  assign mf = mf_t'(q);
endmodule
