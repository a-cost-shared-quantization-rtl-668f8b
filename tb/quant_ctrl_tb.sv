// quant_ctrl_tb -- drives the controller with blocks of 64 coefficients in
// random standards, with random input bubbles and with the configuration pins
// changing inside blocks. A counting model stands in for the row-column
// generator. Checks, for every accepted coefficient: the stage-1 tag one cycle
// later (held block configuration, row, column, last, error flag), the single
// table enable and MUX2 select derived from it, and the stage-4 tag four
// cycles later; also the busy flag and that bubbles carry no valid tag.
module quant_ctrl_tb;
  import dfqa_pkg::*;
  logic clk = 1'b0, rst_n, in_valid;
  logic [2:0] in_std;
  logic [QP_W-1:0] in_qp;
  logic [OFS_FB-1:0] in_f;
  logic [2:0] rc_row, rc_col;
  logic rc_last, rc_adv, rc_clear;
  logic [NUM_LUTS-1:0] lut_en;
  lut_sel_e lut_sel;
  tag_t s1_tag, s4_tag;
  logic busy;
  int checks = 0, failures = 0;
  int pos = 0;

  quant_ctrl dut (.*);
  always #5 clk = ~clk;

  // row-column generator model
  assign rc_row  = 3'(pos / 8);
  assign rc_col  = 3'(pos % 8);
  assign rc_last = (pos == 63);
  always @(posedge clk) begin
    if (!rst_n || rc_clear) pos <= 0;
    else if (rc_adv) pos <= (pos + 1) % 64;
  end

  typedef struct { int code, q, f, row, col; bit last, valid; } t_t;
  t_t hist[$];   // one entry per cycle, what entered

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s got %0d want %0d", what, got, want); end
  endtask

  function automatic int lut_of(int code);
    case (code) 0: return 0; 1: return 1; 2, 3: return 2; 4: return 3; 5: return 4; default: return 7; endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Called at each falling edge before new inputs are driven: the stage-1 tag
  // must show what was driven one edge ago, the stage-4 tag four edges ago.
  task automatic compare();
    t_t a, b;
    if (hist.size() < 4) return;
    a = hist[hist.size() - 1];
    b = hist[hist.size() - 4];
    check("s1 valid", s1_tag.valid, a.valid);
    if (a.valid) begin
      check("s1 err", s1_tag.err, a.code > 5);
      if (a.code <= 5) check("s1 std", s1_tag.standard, a.code);
      check("s1 qp", s1_tag.qp, a.q);
      check("s1 f", s1_tag.h264_f, a.f);
      check("s1 row", s1_tag.row, a.row);
      check("s1 col", s1_tag.col, a.col);
      check("s1 last", s1_tag.last, a.last);
      check("lut_sel", lut_sel, lut_of(a.code));
      check("lut_en", lut_en, (lut_of(a.code) < 5) ? (1 << lut_of(a.code)) : 0);
    end else begin
      check("lut_en idle", lut_en, 0);
    end
    check("s4 valid", s4_tag.valid, b.valid);
    if (b.valid) begin
      check("s4 row", s4_tag.row, b.row);
      check("s4 col", s4_tag.col, b.col);
      check("s4 last", s4_tag.last, b.last);
      check("s4 qp", s4_tag.qp, b.q);
    end
  endtask

  task automatic drive(bit v, int code, int q, int f, int k, bit wiggle);
    @(negedge clk);
    compare();
    in_valid = v;
    if (!v || (wiggle && k > 0)) begin
      in_std = 3'($urandom); in_qp = 6'($urandom); in_f = 16'($urandom);
    end else begin
      in_std = 3'(code); in_qp = 6'(q); in_f = 16'(f);
    end
    if (v) begin
      check("busy", busy, k > 0);
      hist.push_back('{code, q, f, k / 8, k % 8, k == 63, 1});
    end else begin
      hist.push_back('{0, 0, 0, 0, 0, 0, 0});
    end
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_std = 0; in_qp = 0; in_f = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      int code, q, f;
      code = (blk % 13 == 12) ? 6 + blk % 2 : blk % 6;
      q = $urandom % 64; f = $urandom % 32769;
      for (int k = 0; k < 64; k++) begin
        while (k > 0 && blk % 3 == 1 && ($urandom % 4) == 0) begin
          drive(0, 0, 0, 0, k, 0);
          check("busy in bubble", busy, 1);
        end
        drive(1, code, q, f, k, blk % 2 == 1);
      end
      if (blk % 5 == 4) drive(0, 0, 0, 0, 0, 0);
    end
    repeat (6) drive(0, 0, 0, 0, 0, 0);
    check("busy after last", busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
