// trig_rom: 256 x 8 read-only table of sine or cosine samples.
//
// Entry d (0 <= d <= 180) holds round(127 * f(d degrees)) as an 8-bit
// two's-complement number, where f is sin (FN = TRIG_SIN) or cos
// (FN = TRIG_COS), halves rounded away from zero; entries 181..255 are
// zero. For example cos at 0, 45, 90, 135 and 180 degrees gives 7F, 5A, 00,
// A6, 81. The 8-bit samples and the 0..180 range are the design's; the
// entries are computed at elaboration time by hough_pkg::trig127 (integer
// Taylor series), so the table needs no data file and becomes a constant
// ROM in synthesis.
//
// Interface: addr (angle in degrees) -> data. The read is combinational;
// the datapath registers the output (ldC / ldS), so the table plus its
// register behave like a synchronous-read ROM.
module trig_rom
  import hough_pkg::*;
#(
  parameter trig_fn_e FN = TRIG_SIN,
  parameter int       AW = 8
) (
  input  logic [AW-1:0] addr,
  output trig_t         data
);

  trig_t table_q [2**AW];

  for (genvar a = 0; a < 2**AW; a++) begin : g_entry
    localparam trig_t VALUE = trig127(FN, a);
    assign table_q[a] = VALUE;
  end

  assign data = table_q[addr];

endmodule
