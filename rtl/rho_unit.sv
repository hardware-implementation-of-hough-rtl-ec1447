// rho_unit: the two multipliers and the adder that form rho.
//
// rho = x * cos + y * sin, with 8-bit x and y, 8-bit cos and sin samples
// (the sine/cosine scaled by 127) and a 16-bit sum that keeps the low 16
// bits (two's complement). Purely combinational; the datapath registers the
// result in the rho register (ldR).
//
// SIGNED_TRIG selects how the 8-bit samples are read by the multipliers:
//   1 (default): as signed numbers, so cos(135) = -90 and rho follows the
//                line equation, negative rho wrapping to the top of the
//                16-bit address range.
//   0:           as unsigned numbers (0xA6 = 166, 0x81 = 129). This
//                reproduces the output table of the design's published
//                verification run, where e.g. pixel (1, 4) at 135 degrees
//                gives 526 rather than 270.
// Coordinates are always unsigned.
module rho_unit
  import hough_pkg::*;
#(
  parameter bit SIGNED_TRIG = 1'b1
) (
  input  coord_t x,
  input  coord_t y,
  input  trig_t  c,
  input  trig_t  s,
  output rho_t   rho
);

  logic signed [RHO_W:0] px, py;  // products, one guard bit

  always_comb begin
    if (SIGNED_TRIG) begin
      px = $signed({1'b0, x}) * c;
      py = $signed({1'b0, y}) * s;
    end else begin
      px = $signed({1'b0, RHO_W'(x) * RHO_W'($unsigned(c))});
      py = $signed({1'b0, RHO_W'(y) * RHO_W'($unsigned(s))});
    end
    rho = rho_t'(px + py);
  end

endmodule
