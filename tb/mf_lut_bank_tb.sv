// mf_lut_bank_tb -- drives the table bank the way the controller does (one
// enable, matching MUX2 select) with random standards, QPs and positions and
// checks the factor one cycle later. The expected factor is taken from the
// constant tables, with the H.264 position class worked out here; a set of
// published values is checked directly. Switching tables every cycle tests
// that MUX2 follows the registered select while idle tables hold.
module mf_lut_bank_tb;
  import dfqa_pkg::*;
  logic clk = 1'b0, rst_n;
  logic [NUM_LUTS-1:0] lut_en;
  lut_sel_e lut_sel;
  logic [QP_W-1:0] qp;
  logic [2:0] row, col;
  mf_t mf;
  int checks = 0, failures = 0;

  mf_lut_bank dut (.*);
  always #5 clk = ~clk;

  function automatic int grp(int i);
    return (i % 4 == 0) ? 0 : (i % 2 == 1) ? 1 : 2;
  endfunction
  function automatic int cls(int i, int j);
    int a = grp(i), b = grp(j);
    if (a == b) return a;
    return (a + b == 1) ? 3 : (a + b == 2) ? 4 : 5;
  endfunction
  function automatic int expect_mf(int l, int q, int i, int j);
    case (l)
      0: return int'(H264_MF[q % 6][cls(i, j)]);
      1: return int'(AVS_MF[q]);
      2: return int'(VCMP_MF[i][j]);
      3: return int'(JPEG_MF[i][j]);
      4: return int'(HEVC_MF[q % 6]);
      default: return 0;
    endcase
  endfunction

  task automatic rd(int l, int q, int i, int j, int want);
    @(negedge clk);
    lut_sel = lut_sel_e'(l);
    lut_en  = (l < 5) ? NUM_LUTS'(1 << l) : '0;
    qp = 6'(q); row = 3'(i); col = 3'(j);
    @(negedge clk);
    lut_en = '0; lut_sel = LUT_NONE;
    #1;
    checks++;
    if (int'(mf) != want) begin
      failures++; $display("FAIL lut %0d qp %0d (%0d,%0d) got %0d want %0d", l, q, i, j, mf, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; lut_en = '0; lut_sel = LUT_NONE; qp = 0; row = 0; col = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // published values
    rd(0, 7, 0, 0, 11916);
    rd(0, 0, 2, 6, 20972);
    rd(1, 10, 3, 3, 13777);
    rd(2, 0, 0, 0, 31);
    rd(3, 0, 0, 2, 25);
    rd(4, 8, 5, 5, 20560);
    rd(7, 0, 0, 0, 0);
    // random walk, a new table every cycle
    for (int t = 0; t < 2000; t++) begin
      int l, q, i, j, want;
      l = $urandom % 5; q = $urandom % ((l == 1) ? 64 : 52); i = $urandom % 8; j = $urandom % 8;
      @(negedge clk);
      want = expect_mf(int'(lut_sel), int'(qp), int'(row), int'(col));
      // the next request is applied first: the factor of the previous one
      // must stay on the output until the clock edge
      lut_sel = lut_sel_e'(l); lut_en = NUM_LUTS'(1 << l);
      qp = 6'(q); row = 3'(i); col = 3'(j);
      #1;
      if (t > 0) begin
        checks++;
        if (int'(mf) != want) begin
          failures++; $display("FAIL walk t=%0d got %0d want %0d", t, mf, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
