// row_col_gen -- row-column generator of the quantizer pipeline.
//
// Coefficients of an 8x8 block arrive one per accepted cycle in row-major
// order. A 6-bit position counter gives the row (upper three bits) and the
// column (lower three bits) that address the 8x8 multiplication-factor
// tables. `first` marks position (0,0) and `last` position (7,7).
//
// Interface: `adv` moves the counter to the next position at the clock edge
// (it wraps from 63 to 0); `clear` returns it to (0,0) and wins over `adv`.
// The outputs describe the coefficient being accepted in the current cycle,
// so the controller registers them into the stage-1 tag together with it.
// Reset (active-low, synchronous) starts at (0,0).
//
// Generating row and column for the LUTs follows the published architecture;
// the counter form, the clear input and the reset are this design's choices.
module row_col_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  input  logic       clear,
  output logic [2:0] row,
  output logic [2:0] col,
  output logic       first,
  output logic       last
);
  logic [5:0] pos_q;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) pos_q <= '0;
    else if (adv)        pos_q <= pos_q + 6'd1;
  end

  assign row   = pos_q[5:3];
  assign col   = pos_q[2:0];
  assign first = (pos_q == 6'd0);
  assign last  = (pos_q == 6'd63);
endmodule
