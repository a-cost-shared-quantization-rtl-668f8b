// lut_avs_tb -- reads every AVS factor. Exact published values are checked at
// a set of QPs; for all QPs the factor is checked to halve every 8 QP steps
// (MF(qp) ~ 2^15 * 2^(-qp/8), within 2 %), and a disabled table holds.
module lut_avs_tb;
  import dfqa_pkg::*;
  logic clk = 1'b0, en;
  logic [QP_W-1:0] qp;
  mf_t mf;
  int checks = 0, failures = 0;

  lut_avs dut (.*);
  always #5 clk = ~clk;

  int kq [10] = '{0, 1, 7, 10, 15, 16, 31, 47, 62, 63};
  int kv [10] = '{32768, 29775, 17770, 13777, 8958, 8192, 2235, 558, 152, 140};


  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got [64];
    en = 0; qp = 0;
    for (int q = 0; q < 64; q++) begin
      @(negedge clk); en = 1; qp = 6'(q);
      @(negedge clk); en = 0; got[q] = int'(mf);
    end
    foreach (kq[k]) begin
      checks++;
      if (got[kq[k]] != kv[k]) begin
        failures++; $display("FAIL qp=%0d got %0d want %0d", kq[k], got[kq[k]], kv[k]);
      end
    end
    for (int q = 0; q < 64; q++) begin
      automatic real ideal = 32768.0 * (2.0 ** (-real'(q) / 8.0));
      automatic real err = (real'(got[q]) - ideal) / ideal;
      checks++;
      if (err > 0.02 || err < -0.02) begin
        failures++; $display("FAIL qp=%0d got %0d ideal %f", q, got[q], ideal);
      end
    end
    @(negedge clk); qp = 6'd5;
    repeat (2) @(negedge clk);
    checks++;
    if (mf != 16'd140) begin failures++; $display("FAIL disabled table changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
