// hough_controller: the finite-state machine that sequences the transform.
//
// It follows the controller's ASM chart, states S0..S6:
//   S0 Wait            until start is 1
//   S1 Enable          clear the theta and pixel counters
//   S2 Read (X, Y)     load the current pixel's x and y (ldX, ldY)
//   S3 Read theta      load cos, sin and theta of the current angle (ldC, ldS)
//   S4 Load rho        register rho = x*cos + y*sin (ldR)
//   S5 Update acc      read the accumulator entry at rho (ldA), step theta
//                      (ld1) and, after the last angle, the pixel (ld2);
//                      next S3 while angles remain, else S2 while pixels
//                      remain, else S6
//   S6 Done            done = 1 for one cycle, then back to S0
// The write of the incremented count (wren) is issued in the cycle after
// each S5, i.e. in the following S3, S2 or S6; it is a registered output.
// That extra cycle is what the one-cycle delay of S6 gives the last write.
// Which state issues the accumulator read, the write and the counter steps
// is this design's choice; the chart names only the states.
//
// Timing: start seen in S0 at cycle 0 gives done in cycle
// 2 + P * (1 + 3 * A) for P pixels and A angles per pixel (3 cycles per
// angle, one per pixel), after which the controller is back in S0.
// Interface: start, theta_last, pixel_last in; control word and state out.
// Reset is synchronous, active high.
module hough_controller
  import hough_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  logic   theta_last,
  input  logic   pixel_last,
  output ctrl_t  ctrl,
  output state_e state
);

  state_e state_next;
  logic   wren_q;  // S5 last cycle: write back the incremented count now

  always_comb begin
    state_next = state;
    unique case (state)
      S0_WAIT:     if (start) state_next = S1_ENABLE;
      S1_ENABLE:   state_next = S2_READ_XY;
      S2_READ_XY:  state_next = S3_READ_TH;
      S3_READ_TH:  state_next = S4_LOAD_RHO;
      S4_LOAD_RHO: state_next = S5_UPDATE;
      S5_UPDATE:   if (!theta_last)      state_next = S3_READ_TH;
                   else if (!pixel_last) state_next = S2_READ_XY;
                   else                  state_next = S6_DONE;
      S6_DONE:     state_next = S0_WAIT;
      default:     state_next = S0_WAIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S0_WAIT;
      wren_q <= 1'b0;
    end else begin
      state  <= state_next;
      wren_q <= (state == S5_UPDATE);
    end
  end

  always_comb begin
    ctrl      = '0;
    ctrl.clr  = (state == S1_ENABLE);
    ctrl.ldX  = (state == S2_READ_XY);
    ctrl.ldY  = (state == S2_READ_XY);
    ctrl.ldC  = (state == S3_READ_TH);
    ctrl.ldS  = (state == S3_READ_TH);
    ctrl.ldR  = (state == S4_LOAD_RHO);
    ctrl.ldA  = (state == S5_UPDATE);
    ctrl.ld1  = (state == S5_UPDATE);
    ctrl.ld2  = (state == S5_UPDATE) && theta_last;
    ctrl.wren = wren_q;
    ctrl.done = (state == S6_DONE);
  end

  // The pending write never lands in a state that loads a new rho or
  // reads the accumulator, so it always uses the rho and count of its S5.
  a_wren_slot: assert property (@(posedge clk) disable iff (rst)
    ctrl.wren |-> state inside {S2_READ_XY, S3_READ_TH, S6_DONE});

endmodule
