// frame_rate_tb -- streams one full 1080p frame in 4:2:0 sampling through the
// quantizer at its default parameters: 1920x1080 luma plus two 960x540 chroma
// planes, 48,600 8x8 blocks or 3,110,400 coefficients, back to back, with the
// standard changing from block to block. It measures the clock cycles from
// the first coefficient in to the last level out and checks that they equal
// the coefficient count plus the 4-cycle latency. At a 187.3 MHz clock that
// is 16.6 ms per frame, about 60 frames per second. Every level is also
// checked against a reference computed here.
module frame_rate_tb;
  import dfqa_pkg::*;

  localparam int NBLK = (1920 * 1080 + 2 * 960 * 540) / 64;

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
  int checks = 0, failures = 0;
  longint n_out = 0, first_in = -1, last_out = 0, cyc = 0;
  longint exp_q[$];

  multi_quant_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int grp(int i);
    return (i % 4 == 0) ? 0 : (i % 2 == 1) ? 1 : 2;
  endfunction
  function automatic int pcls(int i, int j);
    int a = grp(i), b = grp(j);
    if (a == b) return a;
    return (a + b == 1) ? 3 : (a + b == 2) ? 4 : 5;
  endfunction
  function automatic longint ref_level(int code, int q, int i, int j, longint w);
    case (code)
      0: return (w * longint'(H264_MF[q % 6][pcls(i, j)])) >>> (16 + q / 6);
      1: return (w * longint'(AVS_MF[q]) + longint'(16384)) >>> 15;
      2, 3: return ((w <<< 4) * longint'(VCMP_MF[i][j])) >>> 13;
      4: return (w * longint'(JPEG_MF[i][j])) >>> 8;
      default: return (w * longint'(HEVC_MF[q % 6]) + 8) >>> (16 + q / 6);
    endcase
  endfunction

  initial begin
    repeat (3300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    longint e;
    e = exp_q.pop_front();
    if (longint'(out_y) != e) begin
      failures++;
      if (failures < 10) $display("FAIL level %0d got %0d want %0d", n_out, out_y, e);
    end
    checks++;
    n_out++;
    last_out = cyc;
  end

  initial begin
    rst_n = 0; in_valid = 0; in_w = '0; select_standard = 0; qp = 0; h264_f = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      int code, q;
      code = b % 6;
      q = (code == 1) ? b % 64 : b % 52;
      for (int k = 0; k < 64; k++) begin
        longint w;
        @(negedge clk);
        if (first_in < 0) first_in = cyc;
        w = longint'($signed(12'($urandom))) * ((k == 0) ? 64 : 1);
        in_valid = 1;
        in_w = 20'(w);
        select_standard = 3'(code);
        qp = 6'(q);
        exp_q.push_back(ref_level(code, q, k / 8, k % 8, w));
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (n_out != longint'(NBLK) * 64) begin
      failures++; $display("FAIL %0d levels out", n_out);
    end
    // last level leaves 4 cycles after the last coefficient entered
    checks++;
    if (last_out - first_in + 1 != longint'(NBLK) * 64 + 4) begin
      failures++; $display("FAIL frame took %0d cycles", last_out - first_in + 1);
    end
    $display("frame: %0d coefficients in %0d cycles = %0.2f ms at 187.3 MHz",
             longint'(NBLK) * 64, last_out - first_in + 1,
             real'(last_out - first_in + 1) / 187.3e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
