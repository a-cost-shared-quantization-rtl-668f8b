// lut_h264_tb -- reads the H.264 factor tables: the complete QP mod 6 = 0
// matrix as published, one entry of each of the six position classes for
// every other QP mod 6, and checks that a disabled table keeps its output.
module lut_h264_tb;
  import dfqa_pkg::*;
  logic clk = 1'b0, en;
  logic [2:0] qp_m, row, col;
  mf_t mf;
  int checks = 0, failures = 0;

  lut_h264 dut (.*);
  always #5 clk = ~clk;

  // QP mod 6 = 0 matrix, rows 0..7
  int mf0 [8][8] = '{
    '{13107, 12222, 16777, 12222, 13107, 12222, 16777, 12222},
    '{12222, 11428, 15481, 11428, 12222, 11428, 15481, 11428},
    '{16777, 15481, 20972, 15481, 16777, 15481, 20972, 15481},
    '{12222, 11428, 15481, 11428, 12222, 11428, 15481, 11428},
    '{13107, 12222, 16777, 12222, 13107, 12222, 16777, 12222},
    '{12222, 11428, 15481, 11428, 12222, 11428, 15481, 11428},
    '{16777, 15481, 20972, 15481, 16777, 15481, 20972, 15481},
    '{12222, 11428, 15481, 11428, 12222, 11428, 15481, 11428}};
  // factors M_m0..M_m5 for QP mod 6 = 1..5, read at (0,0) (1,1) (2,2) (0,1) (0,2) (1,2)
  int mfm [5][6] = '{
    '{11916, 10826, 19174, 11058, 14980, 14290},
    '{10082, 8943, 15978, 9675, 12710, 11985},
    '{9362, 8228, 14913, 8931, 11984, 11259},
    '{8192, 7346, 13159, 7740, 10486, 9777},
    '{7282, 6428, 11570, 6830, 9118, 8640}};
  int pr [6] = '{0, 1, 2, 0, 0, 1};
  int pc [6] = '{0, 1, 2, 1, 2, 2};

  task automatic rd(int m, int i, int j, int want);
    @(negedge clk);
    en = 1; qp_m = 3'(m); row = 3'(i); col = 3'(j);
    @(negedge clk);
    en = 0;
    checks++;
    if (mf != 16'(want)) begin
      failures++; $display("FAIL m=%0d (%0d,%0d) got %0d want %0d", m, i, j, mf, want);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; qp_m = 0; row = 0; col = 0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) rd(0, i, j, mf0[i][j]);
    for (int m = 1; m < 6; m++) for (int k = 0; k < 6; k++) begin
      rd(m, pr[k], pc[k], mfm[m-1][k]);
      rd(m, pr[k] + 4, pc[k] + 4, mfm[m-1][k]);   // same class shifted by 4
    end
    // sleep: with en low, address changes do not reach the output
    rd(3, 2, 2, 14913);
    @(negedge clk); qp_m = 0; row = 0; col = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (mf != 16'd14913) begin failures++; $display("FAIL disabled table changed: %0d", mf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
