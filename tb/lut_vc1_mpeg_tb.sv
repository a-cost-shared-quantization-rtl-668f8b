// lut_vc1_mpeg_tb -- reads all 64 VC-1 / MPEG-2/4 factors and checks each
// against the MPEG-2 default intra matrix qm: |MF - 256/qm| <= 1, with the DC
// entry (256/8 = 32) held as 31 in five bits. Row 0 is also checked exactly,
// and a disabled table must hold its output.
module lut_vc1_mpeg_tb;
  import dfqa_pkg::*;
  logic clk = 1'b0, en;
  logic [2:0] row, col;
  mf_t mf;
  int checks = 0, failures = 0;

  lut_vc1_mpeg dut (.*);
  always #5 clk = ~clk;

  int qm [8][8] = '{
    '{ 8, 16, 19, 22, 26, 27, 29, 34},
    '{16, 16, 22, 24, 27, 29, 34, 37},
    '{19, 22, 26, 27, 29, 34, 34, 38},
    '{22, 22, 26, 27, 29, 34, 37, 40},
    '{22, 26, 27, 29, 32, 35, 40, 48},
    '{26, 27, 29, 32, 35, 40, 48, 58},
    '{26, 27, 29, 34, 38, 46, 56, 69},
    '{27, 29, 35, 38, 46, 56, 69, 83}};
  int row0 [8] = '{31, 16, 14, 12, 10, 9, 9, 8};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; row = 0; col = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        real ideal, d;
        @(negedge clk); en = 1; row = 3'(i); col = 3'(j);
        @(negedge clk); en = 0;
        ideal = (i == 0 && j == 0) ? 31.0 : 256.0 / real'(qm[i][j]);
        d = real'(mf) - ideal;
        checks++;
        if (d > 1.0 || d < -1.0) begin
          failures++; $display("FAIL (%0d,%0d) got %0d ideal %f", i, j, mf, ideal);
        end
        if (i == 0) begin
          checks++;
          if (mf != 16'(row0[j])) begin failures++; $display("FAIL row0[%0d] got %0d", j, mf); end
        end
      end
    @(negedge clk); row = 0; col = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (mf != 16'd3) begin failures++; $display("FAIL disabled table changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
