// qp_proc_tb -- checks the parameter decoder for every standard code and QP
// against the parameter table of the algorithm (r, offset, qbits, n + qs_bit),
// with the default 10-bit source depth, plus a few worked values.
module qp_proc_tb;
  import dfqa_pkg::*;
  std_e              standard;
  logic [QP_W-1:0]   qp;
  logic [OFS_FB-1:0] h264_f;
  qparam_t           prm;
  int checks = 0, failures = 0;

  qp_proc dut (.*);

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s got %0d want %0d", what, got, want); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int q = 0; q < 64; q++) begin
        int r, ofs, qb, sh, f;
        f = int'($urandom % 32769);
        standard = std_e'(c); qp = 6'(q); h264_f = 16'(f);
        #1;
        r = 0; ofs = 0; qb = 0; sh = 0;
        case (c)
          0: begin ofs = f;        qb = 16 + q / 6; sh = 16 + q / 6; end
          1: begin ofs = 65536;    qb = 14;         sh = 15;         end
          2, 3: begin r = 4;                        sh = 8 + 5;      end
          4: begin                                  sh = 8;          end
          5: begin ofs = 65536;    qb = 3 - 2 + 2;  sh = 21 + q / 6 - 3 - 2; end
          default: ;
        endcase
        check($sformatf("r std%0d qp%0d", c, q), prm.r, r);
        check($sformatf("offset std%0d qp%0d", c, q), prm.offset, ofs);
        check($sformatf("qbits std%0d qp%0d", c, q), prm.qbits, qb);
        check($sformatf("shift std%0d qp%0d", c, q), prm.shift, sh);
      end
    end
    // worked values: H.264 QP 51 shifts by 24, HEVC QP 2 by 16, VC-1 by 13
    standard = STD_H264; qp = 6'd51; #1; check("H.264 QP51 shift", prm.shift, 24);
    standard = STD_HEVC; qp = 6'd2;  #1; check("HEVC QP2 shift", prm.shift, 16);
    standard = STD_VC1;  qp = 6'd0;  #1; check("VC-1 shift", prm.shift, 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
