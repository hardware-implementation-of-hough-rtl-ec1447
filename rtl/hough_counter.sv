// hough_counter: the theta counter and the pixel counter of the engine.
//
// Theta counts 0, STEP, 2*STEP, ... and returns to 0 after the last angle
// that does not exceed THETA_MAX (180 degrees); it addresses the sine and
// cosine tables. The pixel counter counts 0 .. max_pixel and returns to 0;
// it addresses the X and Y pixel RAMs. Each counter is a register fed by a
// two-way choice (hold, or the next value) in front of a wrap-to-zero
// choice, as in the block diagram (Ld1 / Ld2 select, ">180?" and
// ">max_pixel?" compare). Because both wrap to zero at the end of a sweep,
// they are at zero again when a transform ends.
//
// Interface: clr (synchronous clear of both, used when a transform starts),
// ld1 steps theta, ld2 steps the pixel index, max_pixel is the address of
// the last stored pixel. theta_last / pixel_last flag the final value of
// each count (combinational), which the controller uses for its
// "theta < 180?" and "last (X, Y)?" decisions. Reset is synchronous.
// STEP is 1 degree in the main configuration; the worked example of the
// design uses 45 degrees.
module hough_counter
  import hough_pkg::*;
#(
  parameter int THETA_STEP = 1
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      clr,
  input  logic      ld1,
  input  logic      ld2,
  input  pix_addr_t max_pixel,
  output angle_t    theta,
  output pix_addr_t xy,
  output logic      theta_last,
  output logic      pixel_last
);

  logic [ANGLE_W:0] theta_inc;  // one bit wider: 180 + step may exceed 255
  angle_t           theta_next;
  pix_addr_t        xy_next;

  assign theta_inc  = {1'b0, theta} + (ANGLE_W+1)'(THETA_STEP);
  assign theta_last = theta_inc > (ANGLE_W+1)'(THETA_MAX);
  assign pixel_last = xy >= max_pixel;

  always_comb begin
    theta_next = theta_last ? '0 : theta_inc[ANGLE_W-1:0];
    xy_next    = pixel_last ? '0 : xy + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      theta <= '0;
      xy    <= '0;
    end else begin
      if (ld1) theta <= theta_next;
      if (ld2) xy    <= xy_next;
    end
  end

endmodule
