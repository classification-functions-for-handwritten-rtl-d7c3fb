// digit_classifier: the 45-unit x R handwritten-digit classifier.
//
// A binarised 28x28 image (784 bits) is recognised as one of the ten digits.
// The training data is split into R groups; each group has its own set of 45
// pair units, one for every pair i<j of digits. Pair unit i/j is a linear
// circuit (XOR compound variables) followed by a 2**P-word memory, and votes
// "digit i", "digit j" or "neither". Ten population counters count, for each
// digit d, the votes for d among the 9 units of each group that involve d:
// 9*R inputs per counter, so a count runs from 0 to 9*R. A max selector then
// picks the digit with the largest count; ties are reported in out_winners.
// An image of the training set gets all 9*R votes for its digit when every
// group agrees.
//
// Timing: image is taken with in_valid at a rising edge (edge 1) by the unit
// memories; counters and max selector work during the next cycle and their
// result is registered at edge 2, with out_valid. Latency is two clocks and
// one image can enter every clock.
//
// Configuration (this design's own interface, the trained contents being
// outside the scope of the hardware): cfg_group/cfg_pair name a unit, or
// cfg_bcast names every unit of every group. cfg_mask_we writes compound-
// variable mask cfg_mask_sel of that unit; cfg_lut_we writes the two-bit
// vote cfg_lut_wdata at address cfg_lut_waddr of its memory.
//
// The default R = 4 and P = 16 are the configuration with the best test
// accuracy (45 x 4 = 180 units, none needing more than 16 compound
// variables). Giving every unit the same P, the largest any unit needs, is
// this design's choice: a unit that needs fewer variables leaves masks at
// zero and uses part of its memory. An assertion flags a targeted
// configuration write to a unit number that does not exist; its
// disable-iff on rst_n makes Verilator note rst_n as used both
// asynchronously and synchronously, which does not affect the logic.
module digit_classifier
  import cls_pkg::*;
#(
  parameter int unsigned R  = 4,                         // groups (ensemble size)
  parameter int unsigned P  = 16,                        // variables per unit
  parameter int unsigned N  = N_PIXELS,                  // image bits
  parameter int unsigned GW = (R > 1) ? $clog2(R) : 1,   // group number width
  parameter int unsigned K  = 9 * R,                     // largest count
  parameter int unsigned CW = $clog2(K + 1)              // count width
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // configuration
  input  logic [GW-1:0]                cfg_group,
  input  logic [5:0]                   cfg_pair,
  input  logic                         cfg_bcast,
  input  logic                         cfg_mask_we,
  input  logic [$clog2(P)-1:0]         cfg_mask_sel,
  input  logic [N-1:0]                 cfg_mask_wdata,
  input  logic                         cfg_lut_we,
  input  logic [P-1:0]                 cfg_lut_waddr,
  input  logic [1:0]                   cfg_lut_wdata,
  // images in
  input  logic                         in_valid,
  input  logic [N-1:0]                 image,
  // results out
  output logic                         out_valid,
  output logic [3:0]                   out_digit,
  output logic [N_DIGITS-1:0]          out_winners,
  output logic [CW-1:0]                out_max,
  output logic [N_DIGITS-1:0][CW-1:0]  out_counts
);

  logic [R-1:0][N_PAIRS-1:0][1:0] votes;

  for (genvar g = 0; g < R; g++) begin : g_grp
    logic sel;
    assign sel = cfg_bcast || (cfg_group == GW'(g));

    unit_group45 #(.N(N), .P(P)) u_grp (
      .clk, .rst_n,
      .cfg_pair,
      .cfg_bcast,
      .mask_we    (cfg_mask_we && sel),
      .mask_sel   (cfg_mask_sel),
      .mask_wdata (cfg_mask_wdata),
      .lut_we     (cfg_lut_we && sel),
      .lut_waddr  (cfg_lut_waddr),
      .lut_wdata  (cfg_lut_wdata),
      .x          (image),
      .votes      (votes[g])
    );
  end

  // Counter d takes, from every group, the d-side output of the 9 units
  // that involve digit d: input g*9+k comes from the unit pairing d with
  // the k-th other digit.
  logic [N_DIGITS-1:0][K-1:0]  cnt_in;
  logic [N_DIGITS-1:0][CW-1:0] counts;

  for (genvar d = 0; d < N_DIGITS; d++) begin : g_cnt
    for (genvar g = 0; g < R; g++) begin : g_g
      for (genvar k = 0; k < N_DIGITS - 1; k++) begin : g_k
        localparam int unsigned O  = (k < d) ? k : k + 1;      // other digit
        localparam int unsigned U  = (d < O) ? pair_index(d, O) : pair_index(O, d);
        localparam int unsigned B  = (d < O) ? 1 : 0;           // vote_i or vote_j
        assign cnt_in[d][g*9 + k] = votes[g][U][B];
      end
    end
    popcounter #(.N_IN(K), .CW(CW)) u_cnt (.in(cnt_in[d]), .count(counts[d]));
  end

  logic [CW-1:0]       max_value;
  logic [N_DIGITS-1:0] winners;
  logic [3:0]          digit;

  max_selector #(.N_CNT(N_DIGITS), .K(K), .CW(CW), .DW(4)) u_max (
    .counts, .max_value, .winners, .digit
  );

  // A targeted configuration write must name a unit that exists.
  a_cfg_unit_exists: assert property (
    @(posedge clk) disable iff (!rst_n)
      ((cfg_mask_we || cfg_lut_we) && !cfg_bcast) |-> (cfg_pair < 6'(N_PAIRS) && 32'(cfg_group) < R)
  ) else $error("configuration write to group %0d pair %0d, no such unit", cfg_group, cfg_pair);

  logic valid1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid1      <= 1'b0;
      out_valid   <= 1'b0;
      out_digit   <= '0;
      out_winners <= '0;
      out_max     <= '0;
      out_counts  <= '0;
    end else begin
      valid1    <= in_valid;
      out_valid <= valid1;
      if (valid1) begin
        out_digit   <= digit;
        out_winners <= winners;
        out_max     <= max_value;
        out_counts  <= counts;
      end
    end
  end

endmodule
