// quant_core -- shared multiply / add / shift datapath of the quantizer.
//
// Implements the three steps of the division-free quantization algorithm for
// whichever standard is selected, with one multiplier, one adder and two
// shifters shared by all of them:
//   stage 3:  p   = (w <<< r) * MF          (signed coefficient, unsigned MF)
//             ofs = (offset << qbits) >> 16 (offset in 1.16 fixed point)
//   stage 4:  y   = (p + ofs) >>> shift     (arithmetic shift, rounds down)
// Both stages end in a register, so `y` follows the inputs by two cycles; a new
// coefficient can enter every cycle.
//
// Widths: the coefficient is W_W bits signed. Since no standard's gain
// MF * 2^r / 2^shift exceeds 1, the quantized level fits in W_W bits as well and
// is taken from the low bits of the shifted sum. The operation order and the
// pipeline cut follow the published architecture; the widths, the fixed-point
// offset and rounding toward minus infinity are this design's choices.
module quant_core
  import dfqa_pkg::*;
#(
  parameter int unsigned W_W = 20   // transform coefficient / level width
) (
  input  logic                  clk,
  input  logic signed [W_W-1:0] w,       // stage 2 coefficient
  input  mf_t                   mf,      // stage 2 multiplication factor
  input  qparam_t               prm,     // stage 2 parameters
  output logic signed [W_W-1:0] y        // stage 4 quantized level
);
  localparam int unsigned P_W   = W_W + 7 + MF_W + 1;  // product width
  localparam int unsigned ACC_W = P_W + 1;

  logic signed [P_W-1:0]   p_q;
  logic        [ACC_W-1:0] ofs_q;
  logic        [SH_W-1:0]  sh_q;
  logic signed [ACC_W-1:0] sum;

  // Stage 3: step 1 (shift and shared multiplier), step 2 left shifter.
  always_ff @(posedge clk) begin
    p_q   <= (P_W'(w) <<< prm.r) * $signed({1'b0, mf});
    ofs_q <= (ACC_W'(prm.offset) << prm.qbits) >> OFS_FB;
    sh_q  <= prm.shift;
  end

  // Stage 4: step 2 adder, step 3 right shifter, output register.
  assign sum = ACC_W'(p_q) + $signed(ofs_q);

  always_ff @(posedge clk) begin
    y <= W_W'(sum >>> sh_q);
  end
endmodule
