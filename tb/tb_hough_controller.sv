// tb_hough_controller: runs the controller against loop counters kept in
// the testbench (A angles, P pixels) and checks, every cycle, the state
// and the control word that this state must produce, the delayed write
// after every S5, the exact done cycle 2 + P*(1 + 3*A), and that start is
// ignored outside S0 and a held-low start keeps S0.
module tb_hough_controller;
  import hough_pkg::*;
  logic clk = 0, rst, start, theta_last, pixel_last;
  ctrl_t  ctrl;
  state_e state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hough_controller dut (.clk, .rst, .start, .theta_last, .pixel_last, .ctrl, .state);

  // loop counters driven the way the counter block would
  int ti, pi, A, P;
  assign theta_last = (ti == A - 1);
  assign pixel_last = (pi == P - 1);
  always @(posedge clk) begin
    if (ctrl.clr) begin ti <= 0; pi <= 0; end
    else begin
      if (ctrl.ld1) ti <= (ti == A - 1) ? 0 : ti + 1;
      if (ctrl.ld2) pi <= (pi == P - 1) ? 0 : pi + 1;
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one transform: returns the cycle count from start to done
  task automatic run(int na, int np);
    state_e exp_state, prev;
    int cyc, n_s5;
    logic exp_wren;
    A = na; P = np;
    @(negedge clk);
    check("idle", state, S0_WAIT);
    start = 1;
    @(negedge clk);
    start = 1;  // held: must not restart
    exp_state = S1_ENABLE; cyc = 1; exp_wren = 0; n_s5 = 0;
    forever begin
      check("state", state, exp_state);
      check("clr",  ctrl.clr,  state == S1_ENABLE);
      check("ldX",  ctrl.ldX,  state == S2_READ_XY);
      check("ldY",  ctrl.ldY,  state == S2_READ_XY);
      check("ldC",  ctrl.ldC,  state == S3_READ_TH);
      check("ldS",  ctrl.ldS,  state == S3_READ_TH);
      check("ldR",  ctrl.ldR,  state == S4_LOAD_RHO);
      check("ldA",  ctrl.ldA,  state == S5_UPDATE);
      check("ld1",  ctrl.ld1,  state == S5_UPDATE);
      check("ld2",  ctrl.ld2,  state == S5_UPDATE && theta_last);
      check("wren", ctrl.wren, exp_wren);
      check("done", ctrl.done, state == S6_DONE);
      if (state == S6_DONE) break;
      exp_wren = (state == S5_UPDATE);
      if (state == S5_UPDATE) n_s5++;
      prev = state;
      case (prev)
        S1_ENABLE:   exp_state = S2_READ_XY;
        S2_READ_XY:  exp_state = S3_READ_TH;
        S3_READ_TH:  exp_state = S4_LOAD_RHO;
        S4_LOAD_RHO: exp_state = S5_UPDATE;
        S5_UPDATE:   exp_state = !theta_last ? S3_READ_TH :
                                 !pixel_last ? S2_READ_XY : S6_DONE;
        default:     exp_state = S0_WAIT;
      endcase
      @(negedge clk);
      cyc++;
      if (cyc > 100000) break;
    end
    start = 0;
    check("cycles to done", cyc, 2 + np * (1 + 3 * na));
    check("S5 visits", n_s5, np * na);
    @(negedge clk);
    check("back to S0", state, S0_WAIT);
    check("last write in cycle after S6 entry", ctrl.wren, 0);
  endtask

  initial begin
    rst = 1; start = 0; A = 1; P = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (3) begin
      @(negedge clk);
      check("wait", state, S0_WAIT);
    end
    run(5, 8);    // 45-degree example: 130 cycles
    run(181, 2);  // 1-degree sweep
    run(1, 1);
    run(3, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
