// lut_avs -- AVS multiplication-factor table.
//
// AVS uses one factor per QP (0..63) for every position of the 8x8 block,
// MF close to 2^15 * 2^(-QP/8) (halving every 8 QP steps), so the table is
// indexed by QP alone. It is a
// synchronous ROM: when `en` is high the factor of `qp` is loaded into the
// output register, otherwise the register holds (the table sleeps).
//
// Timing: QP and enable in cycle t, factor on `mf` in cycle t+1.
// The 64 factors follow the published table; the enable form is this
// design's choice.
module lut_avs
  import dfqa_pkg::*;
(
  input  logic            clk,
  input  logic            en,
  input  logic [QP_W-1:0] qp,
  output mf_t             mf
);
  always_ff @(posedge clk) begin
    if (en) mf <= AVS_MF[qp];
  end
endmodule
