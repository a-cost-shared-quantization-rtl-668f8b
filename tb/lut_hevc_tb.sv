// lut_hevc_tb -- reads the six HEVC factors (one per QP mod 6) and checks that
// a disabled table holds its output.
module lut_hevc_tb;
  import dfqa_pkg::*;
  logic clk = 1'b0, en;
  logic [2:0] qp_m;
  mf_t mf;
  int checks = 0, failures = 0;
  int want [6] = '{26214, 23302, 20560, 18396, 16384, 14564};

  lut_hevc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; qp_m = 0;
    for (int r = 0; r < 3; r++)
      for (int m = 0; m < 6; m++) begin
        @(negedge clk); en = 1; qp_m = 3'(m);
        @(negedge clk); en = 0;
        checks++;
        if (mf != 16'(want[m])) begin failures++; $display("FAIL m=%0d got %0d", m, mf); end
      end
    @(negedge clk); qp_m = 3'd1;
    repeat (2) @(negedge clk);
    checks++;
    if (mf != 16'd14564) begin failures++; $display("FAIL disabled table changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
