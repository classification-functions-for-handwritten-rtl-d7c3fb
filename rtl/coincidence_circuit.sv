// coincidence_circuit: coincidence circuit of the max selector.
//
// Raises match when its counter's value equals the largest value found by
// the priority encoder, marking that counter's digit as a winner. It is a
// CW-bit equality comparator; the comparison in binary (rather than on the
// decoded codes) is this design's choice and also makes an all-zero count a
// winner when every count is zero. Combinational.
module coincidence_circuit #(
  parameter int unsigned CW = 6
) (
  input  logic [CW-1:0] count,
  input  logic [CW-1:0] max_value,
  output logic          match
);

  assign match = (count == max_value);

endmodule
