// acc_ram: single-port accumulator RAM (Acc Rho or Acc Theta).
//
// Addressed by the 16-bit rho value. As Acc Rho (DW = 16) it holds how many
// (pixel, theta) pairs produced each rho; as Acc Theta (DW = 8) it holds the
// theta of the last pair that produced it. The datapath reads an entry,
// registers it, and writes back the incremented count one cycle later.
// Write is synchronous, read combinational. Contents start at zero, as an
// FPGA memory initialised at configuration; a host clears entries between
// transforms through the same port.
//
// Interface: addr, we, wdata (clocked write), rdata = mem[addr].
// Depth 2^16 follows the 16-bit rho address of the block diagram.
module acc_ram #(
  parameter int AW = 16,
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
