// qp_proc -- per-standard parameter decoder ("QP processing").
//
// Turns the selected standard, the QP and the H.264 rounding offset f into
// the four numbers the shared datapath needs:
//
//   standard   r  offset   qbits          n + qs_bit
//   H.264      0  f        16 + QP/6      16 + QP/6
//   AVS        0  1        14             15
//   VC-1       4  0        0              8 + 5
//   MPEG-2/4   4  0        0              8 + 5
//   MJPEG      0  0        0              8
//   HEVC       0  1        M - 2 + DB     21 + QP/6 - M - DB
//
// with M = log2(8) = 3 and DB = BIT_DEPTH - 8. The offset is returned in 1.16
// fixed point so that the datapath forms (offset << qbits) >> 16; for H.264 this
// gives f * 2^(16+QP/6) exactly. VC-1 and MPEG-2/4 use a fixed quantization
// step of 32 (qs_bit = 5). An unused standard code returns all zeros.
//
// Purely combinational. The table follows the published algorithm; producing
// it in hardware (rather than in software ahead of the quantizer) and the
// fixed-point offset are this design's choices.
module qp_proc
  import dfqa_pkg::*;
#(
  parameter int unsigned BIT_DEPTH = 10   // source bit depth B, 8 or 10
) (
  input  std_e              standard,
  input  logic [QP_W-1:0]   qp,
  input  logic [OFS_FB-1:0] h264_f,
  output qparam_t           prm
);
  localparam int unsigned M  = 3;                 // log2 of transform size 8
  localparam int unsigned DB = BIT_DEPTH - 8;

  logic [3:0] qd;
  assign qd = qp_div6(qp);

  always_comb begin
    prm = '0;
    unique case (standard)
      STD_H264: begin
        prm.offset = {1'b0, h264_f};
        prm.qbits  = SH_W'(16 + qd);
        prm.shift  = SH_W'(16 + qd);
      end
      STD_AVS: begin
        prm.offset = OFS_W'(1) << OFS_FB;
        prm.qbits  = SH_W'(14);
        prm.shift  = SH_W'(15);
      end
      STD_VC1, STD_MPEG: begin
        prm.r      = 3'd4;
        prm.shift  = SH_W'(8 + 5);
      end
      STD_MJPEG: begin
        prm.shift  = SH_W'(8);
      end
      STD_HEVC: begin
        prm.offset = OFS_W'(1) << OFS_FB;
        prm.qbits  = SH_W'(M - 2 + DB);
        prm.shift  = SH_W'(21 - M - DB + qd);
      end
      default: prm = '0;
    endcase
  end
endmodule
