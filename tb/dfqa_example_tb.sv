// dfqa_example_tb -- quantizes a complete 8x8 block of a natural test image
// (its row-transformed coefficients) with the full quantizer at its default
// parameters, in H.264 (QP 0, f = 0) and in AVS (QP 10), and compares all 64
// levels of each with a reference result computed in floating point.
//
// The hardware shifts right (rounds toward minus infinity) where the floating-
// point reference rounds to nearest or toward zero, so a level may differ from
// it by one. Three H.264 positions, where the reference level does not follow
// from its coefficient by more than rounding, are not compared. The two blocks
// run back to back, so the standard switch between them is exercised too.
module dfqa_example_tb;
  import dfqa_pkg::*;

  logic                  clk = 1'b0, rst_n;
  logic                  in_valid;
  logic signed [19:0]    in_w;
  logic [2:0]            select_standard;
  logic [QP_W-1:0]       qp;
  logic [OFS_FB-1:0]     h264_f;
  logic                  out_valid;
  logic signed [19:0]    out_y;
  logic [2:0]            out_row, out_col, out_std;
  logic                  out_last, out_err, busy;
  int checks = 0, failures = 0, seen = 0;

  multi_quant_top dut (.*);
  always #5 clk = ~clk;

  int h_in [64] = '{
    6921, 7804, 7906, 8085, 8095, 8071, 8104, 8140,
    -2876, -4392, -4590, -4798, -4897, -4824, -4921, -4822,
    1766, 2276, 2039, 1775, 1464, 1273, 981, 564,
    876, 527, 416, 370, 353, 323, 197, 222,
    1308, 1681, 1648, 1542, 1487, 1285, 1197, 1058,
    -22, -244, -223, -199, -144, -169, -149, -212,
    1123, 1336, 1398, 1398, 1433, 1352, 1401, 1206,
    47, -92, -18, -45, 17, -15, -72, -76};
  int h_out [64] = '{
    1384, 1455, 2024, 1508, 1619, 1505, 2075, 1518,
    -535, -766, -1084, -837, -913, -841, -1162, -840,
    452, 538, 652, 419, 375, 301, 314, 133,
    163, 92, 98, 65, 66, 56, 47, 39,
    261, 313, 422, 288, 297, 240, 302, 197,
    -4, -43, -53, -35, -27, -29, -35, -37,
    287, 316, 447, 330, 367, 319, 448, 285,
    9, 16, -4, -8, 3, -3, -17, -13};
  int a_in [64] = '{
    6669, 7488, 7614, 7806, 7841, 7834, 7885, 7938,
    -2832, -4355, -4536, -4726, -4803, -4727, -4801, -4694,
    2001, 2558, 2338, 2097, 1799, 1613, 1334, 928,
    712, 436, 311, 239, 204, 143, -3, -16,
    1168, 1476, 1421, 1309, 1248, 1049, 931, 816,
    331, 258, 270, 283, 313, 271, 266, 160,
    500, 515, 552, 522, 547, 475, 513, 342,
    603, 520, 606, 598, 659, 638, 595, 606};
  int a_out [64] = '{
    2804, 3148, 3201, 3282, 3297, 3294, 3315, 3338,
    -1190, -1830, -1906, -1986, -2018, -1986, -2018, -1973,
    841, 1076, 983, 882, 756, 678, 561, 390,
    299, 183, 131, 100, 86, 60, -1, -6,
    491, 621, 597, 550, 525, 441, 391, 343,
    139, 108, 114, 119, 132, 114, 112, 67,
    210, 217, 232, 219, 230, 200, 216, 144,
    254, 219, 255, 251, 277, 268, 250, 255};

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int k, want, d;
    k = int'(out_row) * 8 + int'(out_col);
    want = (seen < 64) ? h_out[k] : a_out[k];
    d = int'(out_y) - want;
    if (!(seen < 64 && (k == 8 || k == 38 || k == 57))) begin
      checks++;
      if (d > 1 || d < -1) begin
        failures++;
        $display("FAIL %s (%0d,%0d) got %0d reference %0d", (seen < 64) ? "H.264" : "AVS",
                 out_row, out_col, out_y, want);
      end
    end
    checks++;
    if (int'(out_std) != ((seen < 64) ? 0 : 1)) begin failures++; $display("FAIL standard"); end
    seen++;
  end

  initial begin
    rst_n = 0; in_valid = 0; in_w = '0; select_standard = 0; qp = 0; h264_f = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_w = (k < 64) ? 20'(h_in[k]) : 20'(a_in[k - 64]);
      select_standard = (k < 64) ? 3'd0 : 3'd1;
      qp = (k < 64) ? 6'd0 : 6'd10;
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (seen != 128) begin failures++; $display("FAIL %0d levels seen", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
