// max_selector: finds the digit(s) with the largest vote count.
//
// Structure: each of the N_CNT counter values goes through a count_decoder
// (binary to 1-out-of-K code); an or_array merges the codes column by
// column; a priority_encoder takes the highest high column, which is the
// largest count; and one coincidence_circuit per counter flags the counters
// that hold that largest value. Several counters can tie: all of them are
// flagged in winners. digit is the lowest-numbered winner, a single answer
// for a user who needs one (this tie rule is this design's choice).
// Entirely combinational.
module max_selector #(
  parameter int unsigned N_CNT = 10,              // counters (digits)
  parameter int unsigned K     = 36,              // largest possible count
  parameter int unsigned CW    = $clog2(K + 1),   // count width
  parameter int unsigned DW    = $clog2(N_CNT)    // digit number width
) (
  input  logic [N_CNT-1:0][CW-1:0] counts,
  output logic [CW-1:0]            max_value,
  output logic [N_CNT-1:0]         winners,
  output logic [DW-1:0]            digit
);

  logic [N_CNT-1:0][K-1:0] codes;
  logic [K-1:0]            cols;

  for (genvar d = 0; d < N_CNT; d++) begin : g_dec
    count_decoder #(.K(K), .CW(CW)) u_dec (.count(counts[d]), .code(codes[d]));
  end

  or_array #(.ROWS(N_CNT), .K(K)) u_or (.rows(codes), .cols(cols));

  priority_encoder #(.K(K), .CW(CW)) u_pe (.cols(cols), .value(max_value));

  for (genvar d = 0; d < N_CNT; d++) begin : g_coin
    coincidence_circuit #(.CW(CW)) u_coin (
      .count(counts[d]), .max_value(max_value), .match(winners[d])
    );
  end

  always_comb begin
    digit = '0;
    for (int d = N_CNT - 1; d >= 0; d--) if (winners[d]) digit = DW'(d);
  end

endmodule
