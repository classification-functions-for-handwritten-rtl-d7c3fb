// count_decoder: decoder of the max selector.
//
// Turns a counter value (binary, CW bits) into the 1-out-of-K code: output
// bit k-1 is high when the count equals k, for k = 1..K. A count of zero
// gives all zeros. Combinational.
module count_decoder #(
  parameter int unsigned K  = 36,               // largest count
  parameter int unsigned CW = $clog2(K + 1)     // count width
) (
  input  logic [CW-1:0] count,
  output logic [K-1:0]  code
);

  always_comb begin
    for (int k = 1; k <= K; k++) code[k-1] = (count == CW'(k));
  end

endmodule
