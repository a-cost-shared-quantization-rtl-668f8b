// row_col_gen_tb -- checks the row-column generator against a counting model:
// random advance and clear patterns, wrap from (7,7) to (0,0), and the
// first/last flags at every cycle.
module row_col_gen_tb;
  logic clk = 1'b0, rst_n, adv, clear;
  logic [2:0] row, col;
  logic first, last;
  int checks = 0, failures = 0;
  int model, wraps = 0;

  row_col_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s got %0d want %0d", what, got, want); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; adv = 0; clear = 0; model = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      check("row", row, model / 8);
      check("col", col, model % 8);
      check("first", first, model == 0);
      check("last", last, model == 63);
      adv   = ($urandom % 4) != 0;
      clear = ($urandom % 200) == 0;
      @(posedge clk);
      if (clear) model = 0;
      else if (adv) begin
        if (model == 63) wraps++;
        model = (model + 1) % 64;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
