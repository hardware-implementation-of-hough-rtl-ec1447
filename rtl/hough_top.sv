// hough_top: Hough-transform engine for straight-line detection.
//
// For each of the (max_pixel + 1) edge pixels stored in the X/Y pixel RAMs
// and each angle theta = 0, THETA_STEP, ... <= 180 degrees, the engine
// computes rho = x*cos(theta) + y*sin(theta) with 8-bit sine/cosine tables
// (scaled by 127) and increments the accumulator entry at address rho. The
// rho with the highest count is the line through the most pixels; the
// angle RAM gives the theta that produced it.
//
// Structure, as in the synthesized top level: controller (FSM), counter
// (theta and pixel counters) and datapath (tables, pixel RAMs, multiply-add,
// accumulator RAMs). Pulse start while state is S0; done is high for one
// cycle 2 + P*(1 + 3*A) cycles later (P pixels, A = 180/THETA_STEP + 1
// angles; at the default 1-degree step 2 + 544*P cycles).
//
// Host ports (this design's addition): pix_we/pix_waddr/pix_wx/pix_wy load
// pixels; while the state is S0, host_addr selects an accumulator entry,
// shown on host_count/host_theta, and host_clr zeroes it. Accumulators start
// at zero; clear the used entries before running a new image.
// The observation outputs (acc, cos_out, sin_out, param_t_out, rho, x_out,
// y_out, state) mirror those of the original top level.
// Synchronous active-high reset.
module hough_top
  import hough_pkg::*;
#(
  parameter int THETA_STEP  = 1,
  parameter bit SIGNED_TRIG = 1'b1
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  pix_addr_t max_pixel,
  input  logic      pix_we,
  input  pix_addr_t pix_waddr,
  input  coord_t    pix_wx,
  input  coord_t    pix_wy,
  input  rho_t      host_addr,
  input  logic      host_clr,
  output acc_t      host_count,
  output angle_t    host_theta,
  output logic      done,
  output state_e    state,
  output acc_t      acc,
  output trig_t     cos_out,
  output trig_t     sin_out,
  output angle_t    param_t_out,
  output rho_t      rho,
  output coord_t    x_out,
  output coord_t    y_out
);

  ctrl_t     ctrl;
  angle_t    theta;
  pix_addr_t xy;
  logic      theta_last, pixel_last;

  hough_controller u_cu (
    .clk, .rst, .start, .theta_last, .pixel_last, .ctrl, .state);

  hough_counter #(.THETA_STEP(THETA_STEP)) u_count (
    .clk, .rst, .clr(ctrl.clr), .ld1(ctrl.ld1), .ld2(ctrl.ld2), .max_pixel,
    .theta, .xy, .theta_last, .pixel_last);

  hough_datapath #(.SIGNED_TRIG(SIGNED_TRIG)) u_du (
    .clk, .rst, .ctrl, .theta, .xy,
    .pix_we, .pix_waddr, .pix_wx, .pix_wy,
    .host_sel(state == S0_WAIT), .host_addr, .host_clr(host_clr && state == S0_WAIT),
    .host_count, .host_theta,
    .acc_out(acc), .cos_out, .sin_out, .param_t_out, .rho_out(rho), .x_out, .y_out);

  assign done = ctrl.done;

endmodule
