// lut_mjpeg_tb -- reads all 64 MJPEG luminance factors and compares them with
// the published factor matrix, then checks that a disabled table holds.
module lut_mjpeg_tb;
  import dfqa_pkg::*;
  logic clk = 1'b0, en;
  logic [2:0] row, col;
  mf_t mf;
  int checks = 0, failures = 0;

  lut_mjpeg dut (.*);
  always #5 clk = ~clk;

  int want [8][8] = '{
    '{16, 22, 25, 16, 10, 6, 5, 4},
    '{20, 20, 18, 14, 10, 4, 4, 5},
    '{18, 20, 16, 10,  6, 4, 4, 4},
    '{18, 15, 11,  8,  5, 3, 3, 4},
    '{14, 11,  7,  4,  4, 2, 2, 3},
    '{10,  7,  5,  4,  3, 2, 2, 3},
    '{ 5,  4,  3,  3,  2, 2, 2, 2},
    '{ 4,  3,  3,  3,  2, 2, 2, 2}};

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
        @(negedge clk); en = 1; row = 3'(i); col = 3'(j);
        @(negedge clk); en = 0;
        checks++;
        if (mf != 16'(want[i][j])) begin
          failures++; $display("FAIL (%0d,%0d) got %0d want %0d", i, j, mf, want[i][j]);
        end
      end
    @(negedge clk); row = 0; col = 2;
    repeat (2) @(negedge clk);
    checks++;
    if (mf != 16'd2) begin failures++; $display("FAIL disabled table changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
