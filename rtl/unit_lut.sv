// unit_lut: the memory G that holds a unit's reduced classification function.
//
// 2**P words of W bits. The read address is the vector of compound variables
// from the linear circuit; the read is synchronous (data appears one clock
// after the address), as in the FPGA block RAMs the units are meant to map
// to, so a classification costs exactly one memory access. A separate write
// port loads the trained table one word per clock. The memory has no reset:
// its contents are loaded before use.
//
// The table size (2**P words) follows the method; the synchronous read, the
// separate write port and the absence of reset are this design's choices.
module unit_lut #(
  parameter int unsigned P = 16,  // address bits = compound variables
  parameter int unsigned W = 2    // word width (2 for a ternary pair unit)
) (
  input  logic         clk,
  // write port
  input  logic         we,
  input  logic [P-1:0] waddr,
  input  logic [W-1:0] wdata,
  // read port
  input  logic [P-1:0] raddr,
  output logic [W-1:0] rdata
);

  logic [W-1:0] mem [2**P];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
