// multi_quant_top_tb -- end-to-end test of the multi-standard quantizer at its
// default parameters.
//
// Streams 8x8 blocks of transform coefficients through the quantizer in every
// standard and compares each level with a reference model written here from
// the quantization rules (position classes, shifts, offsets and rounding are
// recomputed in the testbench; only the factor constants are shared). It also
//   * checks the worked examples of the algorithm (first coefficients of a
//     test image block in each standard),
//   * checks that every level leaves exactly four cycles after its coefficient
//     entered and that back-to-back blocks give one level per cycle,
//   * counts the mechanisms the design has and fails if one never happened:
//     input bubbles (stalls), standard switches between consecutive blocks,
//     gapless block boundaries, pin changes inside a block (ignored),
//     unused standard codes (error flag), H.264 tables reused for QP >= 6,
//     a nonzero H.264 rounding offset, and blocks of each of the six standards.
module multi_quant_top_tb;
  import dfqa_pkg::*;

  localparam int W_W = 20;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic                  in_valid;
  logic signed [W_W-1:0] in_w;
  logic [2:0]            select_standard;
  logic [QP_W-1:0]       qp;
  logic [OFS_FB-1:0]     h264_f;
  logic                  out_valid;
  logic signed [W_W-1:0] out_y;
  logic [2:0]            out_row, out_col, out_std;
  logic                  out_last, out_err, busy;

  multi_quant_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    longint      y;
    int          row, col, code;
    bit          last, err;
    int unsigned cyc;
  } exp_t;
  exp_t exp_q[$];

  // mechanism counters
  int n_stall = 0, n_switch = 0, n_gapless = 0, n_pin_change = 0, n_err = 0;
  int n_qp_reuse = 0, n_offset = 0;
  int n_std[6] = '{default: 0};
  int n_levels = 0, max_run = 0, run = 0;

  task automatic check(string what, longint got, longint want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d (cycle %0d)", what, got, want, cyc);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic int grp(int i);
    if (i % 4 == 0) return 0;       // 0, 4
    if (i % 2 == 1) return 1;       // odd
    return 2;                       // 2, 6
  endfunction

  function automatic int pos_class(int i, int j);
    int a = grp(i), b = grp(j);
    if (a == b) return a;
    if (a + b == 1) return 3;       // {0,4} with odd
    if (a + b == 2) return 4;       // {0,4} with {2,6}
    return 5;                       // odd with {2,6}
  endfunction

  function automatic longint ref_level(int code, int q, int f, int i, int j, longint w);
    longint mf, add, p;
    int r, sh;
    r = 0; add = 0;
    case (code)
      0: begin mf = H264_MF[q % 6][pos_class(i, j)]; add = longint'(f) << (q / 6); sh = 16 + q / 6; end
      1: begin mf = AVS_MF[q]; add = 64'd1 << 14; sh = 15; end
      2, 3: begin mf = VCMP_MF[i][j]; r = 4; sh = 13; end
      4: begin mf = JPEG_MF[i][j]; sh = 8; end
      5: begin mf = HEVC_MF[q % 6]; add = 64'd1 << 3; sh = 21 + q / 6 - 3 - 2; end
      default: return 0;
    endcase
    p = (w <<< r) * mf + add;
    return p >>> sh;
  endfunction

  // ---------------- driver ----------------
  int last_code = -1;
  bit prev_gap_free = 0;

  // Sends one block. coef[k] < 0x80000 style: values come from `mode`:
  //   0 random full range, 1 small random, 2 given example values then random.
  task automatic send_block(int code, int q, int f, int stall_pct, bit wiggle,
                            longint ex[] = '{}, longint ex_y[] = '{});
    longint w;
    if (last_code >= 0 && last_code != code) n_switch++;
    if (code <= 5) n_std[code]++; else n_err++;
    if (code == 0 && q >= 6) n_qp_reuse++;
    if (code == 0 && f != 0) n_offset++;
    if (prev_gap_free) n_gapless++;
    last_code = code;
    for (int k = 0; k < 64; k++) begin
      exp_t e;
      // optional bubbles inside the block
      while (stall_pct > 0 && k > 0 && ($urandom % 100) < stall_pct) begin
        @(negedge clk);
        in_valid = 1'b0;
        in_w = W_W'($urandom);
        select_standard = 3'($urandom % 6);
        n_stall++;
      end
      @(negedge clk);
      if (k < ex.size())         w = ex[k];
      else if ($urandom % 8 == 0) w = ($urandom % 2) ? 64'sd524287 : -64'sd524288;
      else                        w = longint'($signed(W_W'($urandom)));
      in_valid = 1'b1;
      in_w     = W_W'(w);
      if (k == 0 || !wiggle) begin
        select_standard = 3'(code); qp = 6'(q); h264_f = 16'(f);
      end else begin
        // pins move inside the block; the held configuration must win
        select_standard = 3'((code + 1 + k) % 6); qp = 6'($urandom); h264_f = 16'($urandom);
        n_pin_change++;
      end
      e.y    = ref_level(code, q, f, k / 8, k % 8, w);
      // published example results are checked as given, not through the model
      if (k < ex_y.size()) e.y = ex_y[k];
      e.row  = k / 8;  e.col = k % 8;  e.code = code;
      e.last = (k == 63); e.err = (code > 5);
      e.cyc  = cyc + 4;
      exp_q.push_back(e);
    end
    prev_gap_free = 1;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
    prev_gap_free = 0;
  endtask

  // ---------------- monitor ----------------
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        n_levels++;
        run++;
        if (run > max_run) max_run = run;
        if (exp_q.size() == 0) begin
          failures++; checks++;
          $display("FAIL unexpected level at cycle %0d", cyc);
        end else begin
          automatic exp_t e = exp_q.pop_front();
          check($sformatf("level (%0d,%0d) std %0d", e.row, e.col, e.code), out_y, e.y);
          check("row", out_row, e.row);
          check("col", out_col, e.col);
          check("last", out_last, e.last);
          check("err", out_err, e.err);
          if (!e.err) check("std", out_std, e.code);
          check("latency", cyc, e.cyc);
        end
      end else begin
        run = 0;
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    $timeformat(-9, 0, " ns", 8);
    rst_n = 1'b0; in_valid = 1'b0; in_w = '0; select_standard = '0; qp = '0; h264_f = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    idle(2);

    // Worked examples: first coefficients of the same image block in each standard.
    send_block(0, 0, 0, 0, 0, '{6921, 7804, 7906, 8085, 8095, 8071, 8104, 8140,
                                -2876, -4392}, '{1384, 1455});
    send_block(1, 10, 0, 0, 0, '{6669, 7488}, '{2804, 3148});
    send_block(2, 0, 0, 0, 0, '{10447, 11748}, '{632, 367});
    send_block(4, 0, 0, 0, 0, '{315058, 353880}, '{19691, 30411});
    send_block(5, 2, 0, 0, 0, '{55854, 62777}, '{17522, 19694});
    idle(6);

    // Every standard over a spread of QPs, back to back.
    for (int s = 0; s < 6; s++) begin
      automatic int qmax = (s == 1) ? 64 : 52;
      for (int t = 0; t < 6; t++) begin
        automatic int q = (t == 0) ? 0 : (t == 5) ? qmax - 1 : int'($urandom % qmax);
        automatic int f = (s == 0) ? int'($urandom % 32769) : 0;
        send_block(s, q, f, 0, 0);
      end
    end
    idle(3);

    // Stalls, pin changes inside blocks and unused standard codes.
    send_block(0, 28, 21845, 30, 1);
    send_block(3, 0, 0, 20, 1);
    send_block(6, 13, 0, 0, 0);
    send_block(5, 37, 0, 10, 1);
    send_block(7, 0, 0, 0, 0);
    send_block(1, 63, 0, 25, 0);
    idle(10);

    check("all levels out", exp_q.size(), 0);
    // one level per cycle across a run of back-to-back blocks
    checks++;
    if (max_run < 64 * 30) begin
      failures++;
      $display("FAIL longest gap-free output run %0d", max_run);
    end
    foreach (n_std[s]) begin
      checks++;
      if (n_std[s] == 0) begin failures++; $display("FAIL standard %0d never used", s); end
    end
    begin
      automatic int cnt[7] = '{n_stall, n_switch, n_gapless, n_pin_change, n_err, n_qp_reuse, n_offset};
      automatic string nm[7] = '{"stall", "standard switch", "gapless boundary", "pin change in block",
                       "unused code", "H.264 QP>=6 table reuse", "H.264 offset"};
      for (int m = 0; m < 7; m++) begin
        checks++;
        $display("mechanism %-24s : %0d", nm[m], cnt[m]);
        if (cnt[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[m]); end
      end
    end
    $display("levels=%0d longest run=%0d", n_levels, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
