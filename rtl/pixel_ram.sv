// pixel_ram: one coordinate RAM of the edge-pixel list (X Pixel or Y Pixel).
//
// Holds one coordinate of each detected edge pixel, pixel i at address i.
// A host fills it through the write port before a transform is started;
// the engine reads it through the read port, addressed by the pixel
// counter. The write is synchronous, the read combinational (the datapath
// registers the output in ldX / ldY). All entries start at zero.
//
// Interface: we/waddr/wdata (write, clocked), raddr -> rdata (read).
// The depth (256) and width (8) follow the block diagram; the host write
// port is this design's own addition, the document preloads the RAMs.
module pixel_ram #(
  parameter int AW = 8,
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
