// or_array: OR array of the max selector.
//
// ROWS decoder outputs, each a 1-out-of-K code, enter as rows of a matrix;
// column k of the output is high when any row has bit k high. This is K OR
// gates of ROWS inputs each. After it, column k is high exactly when some
// counter holds the value k+1. Combinational.
module or_array #(
  parameter int unsigned ROWS = 10,
  parameter int unsigned K    = 36
) (
  input  logic [ROWS-1:0][K-1:0] rows,
  output logic [K-1:0]           cols
);

  always_comb begin
    cols = '0;
    for (int r = 0; r < ROWS; r++) cols |= rows[r];
  end

endmodule
