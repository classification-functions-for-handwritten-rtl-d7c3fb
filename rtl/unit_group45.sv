// unit_group45: one 45-unit classifier, the pair units for all 45 pairs i<j
// of the ten digits.
//
// Every pair unit sees the same image and produces a two-bit ternary vote
// (see cls_pkg for the encoding and the numbering of pairs). All 45 units of
// a group are trained on the same part of the training data.
//
// Configuration: a write (mask_we or lut_we) goes to the unit numbered
// cfg_pair, or to all 45 units at once when cfg_bcast is high. Broadcast lets
// a loader fill every table with a default word in 2**P clocks; it is this
// design's addition. Timing is that of pair_unit: votes are valid one clock
// after the image.
module unit_group45
  import cls_pkg::*;
#(
  parameter int unsigned N = 784,
  parameter int unsigned P = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [5:0]                  cfg_pair,
  input  logic                        cfg_bcast,
  input  logic                        mask_we,
  input  logic [$clog2(P)-1:0]        mask_sel,
  input  logic [N-1:0]                mask_wdata,
  input  logic                        lut_we,
  input  logic [P-1:0]                lut_waddr,
  input  logic [1:0]                  lut_wdata,
  input  logic [N-1:0]                x,
  output logic [N_PAIRS-1:0][1:0]     votes
);

  for (genvar u = 0; u < N_PAIRS; u++) begin : g_unit
    logic hit;
    assign hit = cfg_bcast || (cfg_pair == 6'(u));

    pair_unit #(.N(N), .P(P)) u_pair (
      .clk, .rst_n,
      .mask_we   (mask_we && hit),
      .mask_sel,
      .mask_wdata,
      .lut_we    (lut_we && hit),
      .lut_waddr,
      .lut_wdata,
      .x,
      .vote      (votes[u])
    );
  end

endmodule
