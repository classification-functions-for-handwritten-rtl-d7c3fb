// linear_circuit: the linear part L of a linear decomposition f = g(L(x)).
//
// It forms P compound variables from the N input bits. Compound variable j is
// the exclusive OR of the input bits selected by its N-bit mask:
//   y[j] = XOR over k of (mask[j][k] AND x[k]).
// A mask with a single one gives a primitive variable (a plain input bit); a
// mask with several ones gives a compound variable; an all-zero mask gives a
// constant 0, which is how a unit that needs fewer than P variables leaves
// the rest unused. The masks are the result of training, so they are held in
// registers and written one mask per clock through mask_we/mask_sel/
// mask_wdata. The XOR network itself is combinational: y follows x in the
// same cycle. Masks clear to zero on reset (rst_n low).
//
// Making the masks writable, the write port and the reset are this design's
// choices; the XOR form of the compound variables follows the method.
module linear_circuit #(
  parameter int unsigned N = 784,  // input bits (28 x 28 pixels)
  parameter int unsigned P = 16    // compound variables (memory address bits)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // mask write port
  input  logic                 mask_we,
  input  logic [$clog2(P)-1:0] mask_sel,
  input  logic [N-1:0]         mask_wdata,
  // datapath
  input  logic [N-1:0]         x,
  output logic [P-1:0]         y
);

  logic [N-1:0] mask [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < P; j++) mask[j] <= '0;
    end else if (mask_we) begin
      mask[mask_sel] <= mask_wdata;
    end
  end

  always_comb begin
    for (int j = 0; j < P; j++) y[j] = ^(x & mask[j]);
  end

endmodule
