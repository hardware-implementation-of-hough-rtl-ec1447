// hough_datapath: memories, pipeline registers and arithmetic of the engine.
//
// Per angle of a pixel the controller drives three steps:
//   ldC/ldS : C <= Cos[theta], S <= Sin[theta], T <= theta
//   ldR     : R <= X*C + Y*S                       (rho_unit)
//   ldA     : A <= AccRho[R]
//   wren    : AccRho[R] <= A + 1, AccTheta[R] <= T (the cycle after ldA)
// and per pixel ldX/ldY load X <= XPixel[xy], Y <= YPixel[xy]. The cos/sin
// tables are addressed by the theta counter, the pixel RAMs by the pixel
// counter, the accumulators by the rho register, all as in the block
// diagram. Acc Rho ends up holding, for each rho, the number of
// (pixel, angle) pairs that produced it; Acc Theta the angle of the last
// such pair. The highest count marks a line.
//
// Host side (this design's own addition, so that pixels can be loaded and
// results read without preloaded memory images): pix_we writes pixel
// pix_waddr into both pixel RAMs at any time; while host_sel is 1 (the
// engine idle) the accumulators are addressed by host_addr, show their
// entry on host_count / host_theta, and host_clr writes zero to it.
// The register outputs (ACC, CosOut, SinOut, ParamTout, Rho, XOut, YOut)
// are brought out for observation as in the synthesized top level.
// All registers reset synchronously to zero. The counter strobes of the
// shared control word (clr, ld1, ld2) and done are not used here.
module hough_datapath
  import hough_pkg::*;
#(
  parameter bit SIGNED_TRIG = 1'b1
) (
  input  logic      clk,
  input  logic      rst,
  input  ctrl_t     ctrl,
  input  angle_t    theta,
  input  pix_addr_t xy,
  // pixel loading
  input  logic      pix_we,
  input  pix_addr_t pix_waddr,
  input  coord_t    pix_wx,
  input  coord_t    pix_wy,
  // accumulator access while idle
  input  logic      host_sel,
  input  rho_t      host_addr,
  input  logic      host_clr,
  output acc_t      host_count,
  output angle_t    host_theta,
  // observation
  output acc_t      acc_out,
  output trig_t     cos_out,
  output trig_t     sin_out,
  output angle_t    param_t_out,
  output rho_t      rho_out,
  output coord_t    x_out,
  output coord_t    y_out
);

  // memories
  trig_t             cos_q, sin_q;
  coord_t            xpix_q, ypix_q;
  acc_t              rho_rd;
  angle_t            th_rd;

  // registers
  trig_t  c_r, s_r;
  coord_t x_r, y_r;
  angle_t t_r;
  rho_t   r_r;
  acc_t   a_r;
  rho_t   rho_sum;

  // accumulator port
  rho_t   acc_addr;
  logic   acc_we;
  acc_t   acc_wcount;
  angle_t acc_wtheta;

  trig_rom #(.FN(TRIG_COS), .AW(ANGLE_W)) u_cos (.addr(theta), .data(cos_q));
  trig_rom #(.FN(TRIG_SIN), .AW(ANGLE_W)) u_sin (.addr(theta), .data(sin_q));

  pixel_ram #(.AW(PIX_AW), .DW(COORD_W)) u_xpix (
    .clk, .we(pix_we), .waddr(pix_waddr), .wdata(pix_wx), .raddr(xy), .rdata(xpix_q));
  pixel_ram #(.AW(PIX_AW), .DW(COORD_W)) u_ypix (
    .clk, .we(pix_we), .waddr(pix_waddr), .wdata(pix_wy), .raddr(xy), .rdata(ypix_q));

  rho_unit #(.SIGNED_TRIG(SIGNED_TRIG)) u_rho (
    .x(x_r), .y(y_r), .c(c_r), .s(s_r), .rho(rho_sum));

  always_ff @(posedge clk) begin
    if (rst) begin
      c_r <= '0;
      s_r <= '0;
      t_r <= '0;
      x_r <= '0;
      y_r <= '0;
      r_r <= '0;
      a_r <= '0;
    end else begin
      if (ctrl.ldC) begin
        c_r <= cos_q;
        t_r <= theta;
      end
      if (ctrl.ldS) s_r <= sin_q;
      if (ctrl.ldX) x_r <= xpix_q;
      if (ctrl.ldY) y_r <= ypix_q;
      if (ctrl.ldR) r_r <= rho_sum;
      if (ctrl.ldA) a_r <= rho_rd;
    end
  end

  always_comb begin
    if (host_sel) begin
      acc_addr   = host_addr;
      acc_we     = host_clr;
      acc_wcount = '0;
      acc_wtheta = '0;
    end else begin
      acc_addr   = r_r;
      acc_we     = ctrl.wren;
      acc_wcount = a_r + 1'b1;
      acc_wtheta = t_r;
    end
  end

  acc_ram #(.AW(RHO_W), .DW(ACC_W)) u_acc_rho (
    .clk, .addr(acc_addr), .we(acc_we), .wdata(acc_wcount), .rdata(rho_rd));
  acc_ram #(.AW(RHO_W), .DW(ANGLE_W)) u_acc_theta (
    .clk, .addr(acc_addr), .we(acc_we), .wdata(acc_wtheta), .rdata(th_rd));

  assign host_count  = rho_rd;
  assign host_theta  = th_rd;
  assign acc_out     = a_r;
  assign cos_out     = c_r;
  assign sin_out     = s_r;
  assign param_t_out = t_r;
  assign rho_out     = r_r;
  assign x_out       = x_r;
  assign y_out       = y_r;

  // The engine never writes the accumulators while the host owns them.
  a_no_write_when_host: assert property (@(posedge clk) disable iff (rst)
    host_sel |-> !ctrl.wren);

endmodule
