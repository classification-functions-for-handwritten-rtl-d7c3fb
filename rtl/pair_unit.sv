// pair_unit: ternary classifier for one pair of digits (unit i/j).
//
// A linear circuit reduces the 784 image bits to P compound variables, and
// these address a memory of 2**P two-bit words that holds the unit's reduced
// classification function. The word read is the unit's vote:
//   2'b10 = the image is digit i, 2'b01 = digit j, 2'b00 = another digit or
//   unknown (an address no training image of i or j reached).
// The memory is trained only with images of digits i and j.
//
// Timing: x is sampled with the memory read at a rising edge; vote is valid
// from that edge on (one clock of latency, one image per clock).
// Configuration: mask_we writes compound-variable mask mask_sel; lut_we
// writes vote word lut_wdata at address lut_waddr. Both may happen while
// images are being classified.
module pair_unit #(
  parameter int unsigned N = 784,
  parameter int unsigned P = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mask_we,
  input  logic [$clog2(P)-1:0] mask_sel,
  input  logic [N-1:0]         mask_wdata,
  input  logic                 lut_we,
  input  logic [P-1:0]         lut_waddr,
  input  logic [1:0]           lut_wdata,
  input  logic [N-1:0]         x,
  output logic [1:0]           vote
);

  logic [P-1:0] y;

  linear_circuit #(.N(N), .P(P)) u_lin (
    .clk, .rst_n, .mask_we, .mask_sel, .mask_wdata, .x, .y
  );

  unit_lut #(.P(P), .W(2)) u_lut (
    .clk, .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .raddr(y), .rdata(vote)
  );

endmodule
