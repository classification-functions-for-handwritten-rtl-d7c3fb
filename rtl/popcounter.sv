// popcounter: population counter (the Sigma counters of the classifier).
//
// Counts the ones among N_IN inputs and gives the count as a natural binary
// number of $clog2(N_IN+1) bits. It is a tree: the inputs are taken three at
// a time by full adders (carry and sum form a 2-bit count of the three), and
// the leaf counts are summed pairwise, level by level, by a balanced tree of
// adders. The circuit is purely combinational.
//
// Counting with a tree of full adders follows the method; the shape of the
// tree (full-adder leaves, then a balanced binary adder tree) is this
// design's choice.
module popcounter #(
  parameter int unsigned N_IN = 36,
  parameter int unsigned CW   = $clog2(N_IN + 1)
) (
  input  logic [N_IN-1:0] in,
  output logic [CW-1:0]   count
);

  localparam int unsigned L  = (N_IN + 2) / 3;            // full-adder leaves
  localparam int unsigned LV = (L > 1) ? $clog2(L) : 0;   // adder levels
  localparam int unsigned NP = 1 << LV;                   // leaves, padded
  localparam int unsigned NW = 3 * L;                     // inputs, padded

  logic [NW-1:0] in_pad;
  assign in_pad = NW'(in);

  // Level 0: full-adder leaves.
  logic [CW-1:0] leaf [NP];

  for (genvar l = 0; l < NP; l++) begin : g_leaf
    if (l < L) begin : g_fa
      logic a, b, c;
      assign a = in_pad[3*l];
      assign b = in_pad[3*l+1];
      assign c = in_pad[3*l+2];
      assign leaf[l] = CW'({(a & b) | (a & c) | (b & c), a ^ b ^ c});
    end else begin : g_zero
      assign leaf[l] = '0;
    end
  end

  // Levels 1..LV: level lv holds NP >> lv partial sums.
  for (genvar lv = 1; lv <= LV; lv++) begin : g_lvl
    logic [CW-1:0] sum [NP >> lv];
    for (genvar n = 0; n < (NP >> lv); n++) begin : g_add
      if (lv == 1) begin : g_first
        assign sum[n] = leaf[2*n] + leaf[2*n+1];
      end else begin : g_next
        assign sum[n] = g_lvl[lv-1].sum[2*n] + g_lvl[lv-1].sum[2*n+1];
      end
    end
  end

  if (LV == 0) begin : g_out_leaf
    assign count = leaf[0];
  end else begin : g_out_tree
    assign count = g_lvl[LV].sum[0];
  end

endmodule
