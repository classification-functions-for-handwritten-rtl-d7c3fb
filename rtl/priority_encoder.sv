// priority_encoder: priority encoder of the max selector.
//
// Finds the highest-numbered input column that is high and outputs its
// number plus one in binary, so that, fed by the OR array, the output is the
// largest counter value. With no column high the output is zero (every
// counter is zero). Combinational.
module priority_encoder #(
  parameter int unsigned K  = 36,
  parameter int unsigned CW = $clog2(K + 1)
) (
  input  logic [K-1:0]  cols,
  output logic [CW-1:0] value
);

  always_comb begin
    value = '0;
    for (int k = 0; k < K; k++) if (cols[k]) value = CW'(k + 1);
  end

endmodule
