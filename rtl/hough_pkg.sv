// hough_pkg: types and constants shared by the Hough-transform engine.
//
// The engine computes rho = x*cos(theta) + y*sin(theta) for every stored
// edge pixel and every angle theta from 0 to 180 degrees, and counts how
// often each rho value occurs in an accumulator RAM addressed by rho.
// The widths below are the ones of the block diagram: 8-bit pixel
// coordinates and pixel addresses, 8-bit angle (in whole degrees, also the
// address of the sine and cosine tables), 8-bit signed sine/cosine scaled
// by 127, 16-bit rho and 16-bit accumulator counts.
package hough_pkg;

  localparam int COORD_W   = 8;    // x and y coordinate width
  localparam int PIX_AW    = 8;    // pixel RAM address width (256 pixels)
  localparam int ANGLE_W   = 8;    // theta width, degrees
  localparam int TRIG_W    = 8;    // sine / cosine sample width
  localparam int RHO_W     = 16;   // rho width = accumulator address width
  localparam int ACC_W     = 16;   // accumulator count width
  localparam int THETA_MAX = 180;  // last angle of the sweep, degrees

  typedef logic [COORD_W-1:0]       coord_t;
  typedef logic [PIX_AW-1:0]        pix_addr_t;
  typedef logic [ANGLE_W-1:0]       angle_t;
  typedef logic signed [TRIG_W-1:0] trig_t;
  typedef logic [RHO_W-1:0]         rho_t;
  typedef logic [ACC_W-1:0]         acc_t;

  // Controller states, numbered as in the controller's ASM chart.
  typedef enum logic [2:0] {
    S0_WAIT     = 3'd0,  // wait for start
    S1_ENABLE   = 3'd1,  // enable theta and pixel counting (counters cleared)
    S2_READ_XY  = 3'd2,  // read (x, y) of the current pixel
    S3_READ_TH  = 3'd3,  // read cos/sin of the current theta
    S4_LOAD_RHO = 3'd4,  // register rho = x*cos + y*sin
    S5_UPDATE   = 3'd5,  // read the accumulator entry, step the counters
    S6_DONE     = 3'd6   // done, one cycle for the last accumulator write
  } state_e;

  // Control word from the controller to the counter and the datapath.
  typedef struct packed {
    logic clr;   // clear theta and pixel counters
    logic ld1;   // step the theta counter
    logic ld2;   // step the pixel counter
    logic ldX;   // load X register from the X pixel RAM
    logic ldY;   // load Y register from the Y pixel RAM
    logic ldC;   // load cosine register (and the theta register)
    logic ldS;   // load sine register
    logic ldR;   // load rho register
    logic ldA;   // load accumulator-read register
    logic wren;  // write the accumulator RAMs
    logic done;  // transform finished
  } ctrl_t;

  // Which table a trig_rom holds.
  typedef enum logic {TRIG_SIN = 1'b0, TRIG_COS = 1'b1} trig_fn_e;

  // round(127 * sin(d degrees)) for 0 <= d <= 90, halves rounded up,
  // evaluated at elaboration time in 64-bit fixed point with 30 fraction
  // bits: the angle in radians is d * pi / 180 (pi * 2^30 = 3373259425),
  // and sin x = x - x^3/3! + x^5/5! - ... is summed to the x^17 term,
  // well below 2^-20 of error for x <= pi/2. A margin of 2^-20 makes the
  // exact half at 30 degrees (63.5) round up.
  function automatic int sin127_q1(int d);
    longint x, x2, term, sum;
    x    = (longint'(d) * 64'sd3373259425 + 64'sd90) / 64'sd180;
    x2   = (x * x) >>> 30;
    term = x;
    sum  = x;
    for (int k = 1; k <= 8; k++) begin
      term = -(((term * x2) >>> 30) / longint'((2 * k) * (2 * k + 1)));
      sum  = sum + term;
    end
    return int'((64'sd127 * sum + (64'sd1 <<< 29) + (64'sd1 <<< 10)) >>> 30);
  endfunction

  // Table entry d of the sine or cosine table: the sample scaled by 127,
  // rounded half away from zero, for 0 <= d <= 180; zero above 180.
  function automatic trig_t trig127(trig_fn_e fn, int d);
    int v;
    if (d > THETA_MAX)        v = 0;
    else if (fn == TRIG_SIN)  v = (d <= 90) ? sin127_q1(d) : sin127_q1(180 - d);
    else                      v = (d <= 90) ? sin127_q1(90 - d) : -sin127_q1(d - 90);
    return trig_t'(v);
  endfunction

endpackage
