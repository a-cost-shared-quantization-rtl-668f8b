// quant_core_tb -- drives the shared datapath with random coefficients,
// factors and parameters every cycle and compares each level, two cycles
// later, with (((w << r) * MF) + ((offset << qbits) >> 16)) >>> shift computed
// here in 64-bit arithmetic. Includes full-scale coefficients of both signs.
module quant_core_tb;
  import dfqa_pkg::*;
  localparam int W_W = 20;
  logic clk = 1'b0;
  logic signed [W_W-1:0] w, y;
  mf_t mf;
  qparam_t prm;
  int checks = 0, failures = 0;
  longint exp_q[$];

  quant_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    for (int t = 0; t < 5000; t++) begin
      longint lw, lmf, ofs, e;
      int kind;
      @(negedge clk);
      if (t >= 2) begin
        e = exp_q.pop_front();
        checks++;
        if (longint'(y) != e) begin
          failures++;
          $display("FAIL t=%0d got %0d want %0d", t, y, e);
        end
      end
      // a parameter set of one of the standards, or a random one
      kind = $urandom % 6;
      lw   = ($urandom % 10 == 0) ? (($urandom % 2) ? 524287 : -524288)
                                  : longint'($signed(20'($urandom)));
      prm = '0;
      case (kind)
        0: begin lmf = $urandom % 21000; prm.offset = 17'($urandom % 32769);
                 prm.qbits = 5'(16 + $urandom % 9); prm.shift = prm.qbits; end
        1: begin lmf = 140 + $urandom % 32629; prm.offset = 17'h10000; prm.qbits = 14; prm.shift = 15; end
        2: begin lmf = $urandom % 32; prm.r = 4; prm.shift = 13; end
        3: begin lmf = $urandom % 32; prm.shift = 8; end
        4: begin lmf = 14564 + $urandom % 11651; prm.offset = 17'h10000; prm.qbits = 3;
                 prm.shift = 5'(16 + $urandom % 9); end
        default: begin lmf = 140 + $urandom % 32629; prm.offset = 17'h10000; prm.qbits = 14; prm.shift = 15; end
      endcase
      w  = W_W'(lw);
      mf = 16'(lmf);
      ofs = (longint'(prm.offset) << prm.qbits) >> 16;
      e = (((lw <<< prm.r) * lmf) + ofs) >>> prm.shift;
      exp_q.push_back(e);
      n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
