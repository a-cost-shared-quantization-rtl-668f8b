// dfqa_pkg -- shared types and constants of the division-free multi-standard
// 8x8 quantizer.
//
// Every supported standard is reduced to the same three-step recipe
//   p = (w << r) * MF[i][j];  q = p + (offset << qbits);  y = q >>> (n + qs_bit)
// and differs only in r, offset, qbits, n + qs_bit and in the MF table. This
// package holds the 3-bit standard code carried on the select_standard pin,
// the per-coefficient pipeline tag, the parameter bundle produced for the
// datapath, and the MF constants of every standard:
//   * H.264: six factors per QP mod 6, placed in the 8x8 block by position class
//   * AVS:   one factor per QP (0..63)
//   * VC-1 and MPEG-2/4: one 8x8 table, round(2^8 / intra matrix), 5-bit values
//   * MJPEG: one 8x8 table for the luminance matrix, same rule
//   * HEVC:  six factors indexed by QP mod 6
// The tables and shift amounts follow the published algorithm. The numeric
// code of each standard, the widths and the fixed-point form of the offset
// are this design's own choices.
package dfqa_pkg;

  // Standard code on the 3-bit select_standard pin. Codes 6 and 7 are unused.
  typedef enum logic [2:0] {
    STD_H264  = 3'd0,
    STD_AVS   = 3'd1,
    STD_VC1   = 3'd2,
    STD_MPEG  = 3'd3,
    STD_MJPEG = 3'd4,
    STD_HEVC  = 3'd5
  } std_e;

  // One enable per look-up table (VC-1 and MPEG-2/4 share one table).
  typedef enum logic [2:0] {
    LUT_H264 = 3'd0,
    LUT_AVS  = 3'd1,
    LUT_VCMP = 3'd2,
    LUT_JPEG = 3'd3,
    LUT_HEVC = 3'd4,
    LUT_NONE = 3'd7
  } lut_sel_e;
  localparam int unsigned NUM_LUTS = 5;

  localparam int unsigned MF_W   = 16;  // width of every multiplication factor
  localparam int unsigned QP_W   = 6;   // QP 0..51 (H.264, HEVC) or 0..63 (AVS)
  localparam int unsigned SH_W   = 5;   // right-shift amount n + qs_bit, at most 26
  localparam int unsigned OFS_FB = 16;  // fraction bits of the offset value
  localparam int unsigned OFS_W  = OFS_FB + 1;  // offset in 1.16 form, 0 .. 1.0

  // Control information travelling with each coefficient down the pipeline.
  typedef struct packed {
    logic             valid;
    logic             err;    // select_standard held an unused code
    std_e             standard;
    logic [QP_W-1:0]  qp;
    logic [OFS_FB-1:0] h264_f; // H.264 rounding offset f, 0.16 fixed point
    logic [2:0]       row;
    logic [2:0]       col;
    logic             last;   // coefficient (7,7), end of the 8x8 block
  } tag_t;

  // Datapath parameters of Table "DFQA parameters" for one coefficient.
  typedef struct packed {
    logic [2:0]       r;          // left shift of the coefficient
    logic [OFS_W-1:0] offset;     // offset value, 1.16 fixed point
    logic [SH_W-1:0]  qbits;      // left shift of the offset
    logic [SH_W-1:0]  shift;      // n + qs_bit
  } qparam_t;

  // QP / 6 and QP mod 6 for a 6-bit QP.
  function automatic logic [3:0] qp_div6(input logic [QP_W-1:0] qp);
    return 4'(qp / 6);
  endfunction

  function automatic logic [2:0] qp_mod6(input logic [QP_W-1:0] qp);
    return 3'(qp % 6);
  endfunction

  // ---------------- H.264 ----------------
  // H264_MF[m][k] = M_mk of QP mod 6 = m, position class k.
  typedef logic [MF_W-1:0] mf_t;
  localparam mf_t H264_MF [6][6] = '{
    '{16'd13107, 16'd11428, 16'd20972, 16'd12222, 16'd16777, 16'd15481},
    '{16'd11916, 16'd10826, 16'd19174, 16'd11058, 16'd14980, 16'd14290},
    '{16'd10082, 16'd8943,  16'd15978, 16'd9675,  16'd12710, 16'd11985},
    '{16'd9362,  16'd8228,  16'd14913, 16'd8931,  16'd11984, 16'd11259},
    '{16'd8192,  16'd7346,  16'd13159, 16'd7740,  16'd10486, 16'd9777},
    '{16'd7282,  16'd6428,  16'd11570, 16'd6830,  16'd9118,  16'd8640}
  };

  // Position class of element (i, j) of an 8x8 H.264 block:
  //   index 0, 4 -> group A; odd -> group B; 2, 6 -> group C
  //   AA:0  BB:1  CC:2  AB:3  AC:4  BC:5
  function automatic logic [2:0] h264_class(input logic [1:0] i, input logic [1:0] j);
    logic [1:0] gi, gj;
    gi = i[0] ? 2'd1 : (i[1] ? 2'd2 : 2'd0);
    gj = j[0] ? 2'd1 : (j[1] ? 2'd2 : 2'd0);
    if (gi == gj)                                      return {1'b0, gi};
    else if ((gi == 2'd0 && gj == 2'd1) || (gi == 2'd1 && gj == 2'd0)) return 3'd3;
    else if ((gi == 2'd0 && gj == 2'd2) || (gi == 2'd2 && gj == 2'd0)) return 3'd4;
    else                                               return 3'd5;
  endfunction

  // ---------------- AVS ----------------
  localparam mf_t AVS_MF [64] = '{
    16'd32768, 16'd29775, 16'd27554, 16'd25268, 16'd23170, 16'd21247, 16'd19369, 16'd17770,
    16'd16302, 16'd15024, 16'd13777, 16'd12634, 16'd11626, 16'd10624, 16'd9742,  16'd8958,
    16'd8192,  16'd7512,  16'd6889,  16'd6305,  16'd5793,  16'd5303,  16'd4878,  16'd4467,
    16'd4091,  16'd3756,  16'd3444,  16'd3161,  16'd2894,  16'd2654,  16'd2435,  16'd2235,
    16'd2048,  16'd1878,  16'd1722,  16'd1579,  16'd1449,  16'd1329,  16'd1218,  16'd1117,
    16'd1024,  16'd939,   16'd861,   16'd790,   16'd724,   16'd664,   16'd609,   16'd558,
    16'd512,   16'd470,   16'd430,   16'd395,   16'd362,   16'd332,   16'd304,   16'd279,
    16'd256,   16'd235,   16'd215,   16'd197,   16'd181,   16'd166,   16'd152,   16'd140
  };

  // ---------------- VC-1 and MPEG-2/4 ----------------
  // round(2^8 / intra_matrix[i][j]), held in 5 bits (the DC entry 32 saturates to 31).
  typedef logic [4:0] mf5_t;
  localparam mf5_t VCMP_MF [8][8] = '{
    '{5'd31, 5'd16, 5'd14, 5'd12, 5'd10, 5'd9, 5'd9, 5'd8},
    '{5'd16, 5'd16, 5'd12, 5'd10, 5'd9,  5'd9, 5'd8, 5'd7},
    '{5'd14, 5'd12, 5'd10, 5'd9,  5'd9,  5'd8, 5'd8, 5'd7},
    '{5'd12, 5'd12, 5'd10, 5'd9,  5'd9,  5'd8, 5'd7, 5'd7},
    '{5'd12, 5'd10, 5'd9,  5'd9,  5'd8,  5'd7, 5'd6, 5'd5},
    '{5'd10, 5'd9,  5'd9,  5'd8,  5'd7,  5'd6, 5'd5, 5'd4},
    '{5'd10, 5'd9,  5'd9,  5'd8,  5'd7,  5'd5, 5'd4, 5'd4},
    '{5'd9,  5'd9,  5'd7,  5'd7,  5'd5,  5'd4, 5'd4, 5'd3}
  };

  // ---------------- MJPEG (luminance) ----------------
  localparam mf5_t JPEG_MF [8][8] = '{
    '{5'd16, 5'd22, 5'd25, 5'd16, 5'd10, 5'd6, 5'd5, 5'd4},
    '{5'd20, 5'd20, 5'd18, 5'd14, 5'd10, 5'd4, 5'd4, 5'd5},
    '{5'd18, 5'd20, 5'd16, 5'd10, 5'd6,  5'd4, 5'd4, 5'd4},
    '{5'd18, 5'd15, 5'd11, 5'd8,  5'd5,  5'd3, 5'd3, 5'd4},
    '{5'd14, 5'd11, 5'd7,  5'd4,  5'd4,  5'd2, 5'd2, 5'd3},
    '{5'd10, 5'd7,  5'd5,  5'd4,  5'd3,  5'd2, 5'd2, 5'd3},
    '{5'd5,  5'd4,  5'd3,  5'd3,  5'd2,  5'd2, 5'd2, 5'd2},
    '{5'd4,  5'd3,  5'd3,  5'd3,  5'd2,  5'd2, 5'd2, 5'd2}
  };

  // ---------------- HEVC ----------------
  localparam mf_t HEVC_MF [6] = '{
    16'd26214, 16'd23302, 16'd20560, 16'd18396, 16'd16384, 16'd14564
  };

endpackage
