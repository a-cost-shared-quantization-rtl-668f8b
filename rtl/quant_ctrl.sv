// quant_ctrl -- the single controller shared by all six standards.
//
// A two-state FSM follows the 8x8 blocks streaming in:
//   IDLE  no block open. The next valid coefficient opens a block: the
//         select_standard, QP and H.264 offset pins are sampled and held in
//         a configuration register for the whole block.
//   RUN   block open. Coefficients use the held configuration, whatever the
//         pins do; the coefficient at (7,7) closes the block (back to IDLE).
// A cycle without `in_valid` is a bubble: the row-column generator holds and
// nothing enters the pipeline, so the upstream transform may stall at will.
// The generator's advance output `rc_adv` is therefore `in_valid` itself.
//
// For every accepted coefficient the controller builds a tag (standard, QP,
// offset, row, column, last, error) in the stage-1 register and moves it down
// the stage-2/3/4 registers in step with the data. From the stage-1 tag it
// raises exactly one look-up-table enable and the MUX2 select, so only the
// table of the current standard reads. Codes 6 and 7 on select_standard are
// not standards: such a block is still carried through, with no table
// enabled, and its tags have `err` set.
//
// Timing: coefficient accepted in cycle t -> s1 tag in t+1, s2 in t+2,
// s3 in t+3, s4 (output) in t+4. One coefficient per cycle, no gap between
// blocks. The FSM, the per-block latching of the configuration and the error
// flag are this design's reading of a controller the published work names but
// does not detail.
module quant_ctrl
  import dfqa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [2:0]          in_std,
  input  logic [QP_W-1:0]     in_qp,
  input  logic [OFS_FB-1:0]   in_f,
  // row-column generator
  input  logic [2:0]          rc_row,
  input  logic [2:0]          rc_col,
  input  logic                rc_last,
  output logic                rc_adv,
  output logic                rc_clear,
  // look-up table control (stage 1)
  output logic [NUM_LUTS-1:0] lut_en,
  output lut_sel_e            lut_sel,
  // pipeline tags
  output tag_t                s1_tag,
  output tag_t                s4_tag,
  output logic                busy     // a block is open
);
  typedef enum logic {IDLE, RUN} state_e;

  typedef struct packed {
    logic [2:0]        code;
    logic [QP_W-1:0]   qp;
    logic [OFS_FB-1:0] f;
  } cfg_t;

  state_e state_q;
  cfg_t   cfg_q, cfg;
  tag_t   tag_in, s2_tag, s3_tag;

  // Configuration for the coefficient accepted now.
  assign cfg = (state_q == IDLE) ? cfg_t'{in_std, in_qp, in_f} : cfg_q;

  always_comb begin
    tag_in          = '0;
    tag_in.valid    = in_valid;
    tag_in.err      = (cfg.code > 3'd5);
    tag_in.standard = std_e'(cfg.code);
    tag_in.qp       = cfg.qp;
    tag_in.h264_f   = cfg.f;
    tag_in.row      = rc_row;
    tag_in.col      = rc_col;
    tag_in.last     = rc_last;
  end

  assign rc_adv   = in_valid;
  assign rc_clear = (state_q == IDLE) && !in_valid;
  assign busy     = (state_q == RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= IDLE;
      cfg_q   <= '0;
    end else if (in_valid) begin
      if (state_q == IDLE) cfg_q <= cfg;
      state_q <= rc_last ? IDLE : RUN;
    end
  end

  // Tag pipeline: stage 1 .. stage 4.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_tag <= '0;
      s2_tag <= '0;
      s3_tag <= '0;
      s4_tag <= '0;
    end else begin
      s1_tag <= tag_in;
      s2_tag <= s1_tag;
      s3_tag <= s2_tag;
      s4_tag <= s3_tag;
    end
  end

  // Look-up table enable and MUX2 select from the stage-1 tag.
  always_comb begin
    lut_sel = LUT_NONE;
    if (s1_tag.valid && !s1_tag.err) begin
      unique case (s1_tag.standard)
        STD_H264:          lut_sel = LUT_H264;
        STD_AVS:           lut_sel = LUT_AVS;
        STD_VC1, STD_MPEG: lut_sel = LUT_VCMP;
        STD_MJPEG:         lut_sel = LUT_JPEG;
        STD_HEVC:          lut_sel = LUT_HEVC;
        default:           lut_sel = LUT_NONE;
      endcase
    end
    lut_en = '0;
    if (lut_sel != LUT_NONE) lut_en[lut_sel] = 1'b1;
  end
endmodule
