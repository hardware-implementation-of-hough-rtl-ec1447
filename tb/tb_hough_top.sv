// tb_hough_top: end-to-end run of the worked example: eight edge pixels,
// (0,5) (1,4) (2,3) (3,2) (3,5) (4,1) (4,3) (5,5), with a 45-degree step
// (0, 45, 90, 135, 180). Two engines run side by side: one reading the
// sine/cosine samples as unsigned numbers, whose rho values must equal
// the published output table digit for digit, and one reading them as
// signed numbers, whose rho values must follow rho = x*cos + y*sin.
// Checks every rho as it is registered, the done cycle (2 + 8*16 = 130),
// the final accumulator contents against a reference built here, the
// peak (rho 450, six votes), a second run after clearing the used entries,
// and counts each mechanism: theta wrap, pixel wrap, the deferred write
// landing in S3, S2 and S6, a vote on an already-counted rho, a host clear,
// a start ignored while busy and a difference between the two readings.
module tb_hough_top;
  import hough_pkg::*;
  logic clk = 0, rst, start;
  pix_addr_t max_pixel;
  logic pix_we;
  pix_addr_t pix_waddr;
  coord_t pix_wx, pix_wy;
  rho_t host_addr;
  logic host_clr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // per-engine outputs: index 0 unsigned, 1 signed
  acc_t   host_count [2], acc [2];
  angle_t host_theta [2], param_t_out [2];
  logic   done [2];
  state_e state [2];
  trig_t  cos_out [2], sin_out [2];
  rho_t   rho [2];
  coord_t x_out [2], y_out [2];

  hough_top #(.THETA_STEP(45), .SIGNED_TRIG(1'b0)) u_uns (
    .clk, .rst, .start, .max_pixel, .pix_we, .pix_waddr, .pix_wx, .pix_wy,
    .host_addr, .host_clr, .host_count(host_count[0]), .host_theta(host_theta[0]),
    .done(done[0]), .state(state[0]), .acc(acc[0]), .cos_out(cos_out[0]),
    .sin_out(sin_out[0]), .param_t_out(param_t_out[0]), .rho(rho[0]),
    .x_out(x_out[0]), .y_out(y_out[0]));
  hough_top #(.THETA_STEP(45), .SIGNED_TRIG(1'b1)) u_sgn (
    .clk, .rst, .start, .max_pixel, .pix_we, .pix_waddr, .pix_wx, .pix_wy,
    .host_addr, .host_clr, .host_count(host_count[1]), .host_theta(host_theta[1]),
    .done(done[1]), .state(state[1]), .acc(acc[1]), .cos_out(cos_out[1]),
    .sin_out(sin_out[1]), .param_t_out(param_t_out[1]), .rho(rho[1]),
    .x_out(x_out[1]), .y_out(y_out[1]));

  int px [8] = '{0, 1, 2, 3, 3, 4, 4, 5};
  int py [8] = '{5, 4, 3, 2, 5, 1, 3, 5};
  // published rho for 0/45/90/135/180 degrees (unsigned reading)
  int tab [8][5] = '{
    '{0, 450, 635, 450, 0},
    '{127, 450, 508, 526, 129},
    '{254, 450, 381, 602, 258},
    '{381, 450, 254, 678, 387},
    '{381, 720, 635, 948, 387},
    '{508, 450, 127, 754, 516},
    '{508, 630, 381, 934, 516},
    '{635, 900, 635, 1280, 645}};
  int cs [5] = '{127, 90, 0, -90, -127};
  int sn [5] = '{0, 90, 127, 90, 0};

  int ref_cnt [2][int];
  int ref_th  [2][int];
  int seq [2];         // index of the next (pixel, angle) pair
  int cyc, done_cyc [2];
  // mechanism counters
  int n_theta_wrap, n_pixel_wrap, n_wr_s3, n_wr_s2, n_wr_s6, n_revote;
  int n_host_clr, n_start_ignored, n_mode_diff;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // per-engine monitor: the rho register is valid during S5
  for (genvar e = 0; e < 2; e++) begin : g_mon
    int exp_acc = -1;  // ACC register value due one cycle after S5
    always @(negedge clk) if (!rst) begin
      if (exp_acc >= 0) begin
        check("acc read", acc[e], exp_acc);
        exp_acc = -1;
      end
      if (state[e] == S5_UPDATE) begin
        int p, a, exp_rho, key;
        p = seq[e] / 5; a = seq[e] % 5;
        exp_rho = (e == 0) ? tab[p][a] : ((px[p] * cs[a] + py[p] * sn[a]) & 16'hFFFF);
        check($sformatf("rho e%0d (%0d,%0d) th%0d", e, px[p], py[p], a * 45), rho[e], exp_rho);
        check("x reg", x_out[e], px[p]);
        check("y reg", y_out[e], py[p]);
        check("theta reg", param_t_out[e], a * 45);
        check("cos reg", cos_out[e], cs[a]);
        check("sin reg", sin_out[e], sn[a]);
        key = exp_rho;
        exp_acc = ref_cnt[e].exists(key) ? ref_cnt[e][key] : 0;
        if (e == 0 && ref_cnt[e].exists(key)) n_revote++;
        if (e == 1 && rho[1] != rho[0]) n_mode_diff++;
        ref_cnt[e][key] = ref_cnt[e].exists(key) ? ref_cnt[e][key] + 1 : 1;
        ref_th[e][key] = a * 45;
        if (e == 0 && a == 4) n_theta_wrap++;
        if (e == 0 && p == 7 && a == 4) n_pixel_wrap++;
        seq[e]++;
      end
      if (done[e]) done_cyc[e] = cyc;
    end
  end

  // where the deferred write lands (observed on the unsigned engine)
  always @(negedge clk) if (!rst && u_uns.u_cu.ctrl.wren) begin
    if (state[0] == S3_READ_TH) n_wr_s3++;
    if (state[0] == S2_READ_XY) n_wr_s2++;
    if (state[0] == S6_DONE)    n_wr_s6++;
  end

  task automatic run_and_check(int run);
    int t0;
    seq = '{0, 0};
    done_cyc = '{-1, -1};
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    repeat (5) @(negedge clk);
    start = 1;                        // ignored: the engines are busy
    @(negedge clk) start = 0;
    if (state[0] != S0_WAIT) n_start_ignored++;
    wait (done_cyc[0] >= 0 && done_cyc[1] >= 0);
    repeat (3) @(negedge clk);
    check("done cycle unsigned", done_cyc[0] - t0, 130);
    check("done cycle signed", done_cyc[1] - t0, 130);
    check("pairs unsigned", seq[0], 40);
    check("pairs signed", seq[1], 40);
    check("idle", state[0], S0_WAIT);
    // read back every touched entry of both engines
    for (int e = 0; e < 2; e++)
      foreach (ref_cnt[e][k]) begin
        @(negedge clk) host_addr = rho_t'(k);
        #1;
        check($sformatf("run%0d e%0d count[%0d]", run, e, k), host_count[e], ref_cnt[e][k]);
        check($sformatf("run%0d e%0d theta[%0d]", run, e, k), host_theta[e], ref_th[e][k]);
      end
    // the line through (0,5) .. (4,1): rho 450 holds six votes
    @(negedge clk) host_addr = 16'd450;
    #1;
    check("peak unsigned", host_count[0], 6);
    check("peak signed", host_count[1], 6);
    check("peak theta", host_theta[0], 45);
    for (int e = 0; e < 2; e++)
      foreach (ref_cnt[e][k]) check("450 is the peak", ref_cnt[e][k] <= 6, 1);
  endtask

  task automatic clear_used();
    for (int e = 0; e < 2; e++)
      foreach (ref_cnt[e][k]) begin
        @(negedge clk) begin host_addr = rho_t'(k); host_clr = 1; end
        n_host_clr++;
      end
    @(negedge clk) host_clr = 0;
    for (int e = 0; e < 2; e++)
      foreach (ref_cnt[e][k]) begin
        host_addr = rho_t'(k); #1;
        check("cleared", host_count[e], 0);
      end
    ref_cnt[0].delete(); ref_cnt[1].delete();
    ref_th[0].delete();  ref_th[1].delete();
  endtask

  initial begin
    rst = 1; start = 0; max_pixel = 8'd7; pix_we = 0; pix_waddr = '0;
    pix_wx = '0; pix_wy = '0; host_addr = '0; host_clr = 0; cyc = 0;
    seq = '{0, 0};
    {n_theta_wrap, n_pixel_wrap, n_wr_s3, n_wr_s2, n_wr_s6, n_revote} = '0;
    {n_host_clr, n_start_ignored, n_mode_diff} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      pix_we = 1; pix_waddr = pix_addr_t'(i); pix_wx = coord_t'(px[i]); pix_wy = coord_t'(py[i]);
    end
    @(negedge clk) pix_we = 0;
    run_and_check(1);
    clear_used();
    run_and_check(2);
    $display("mechanisms: theta_wrap=%0d pixel_wrap=%0d write_in_S3=%0d write_in_S2=%0d write_in_S6=%0d",
             n_theta_wrap, n_pixel_wrap, n_wr_s3, n_wr_s2, n_wr_s6);
    $display("            revote=%0d host_clear=%0d start_ignored=%0d signed_vs_unsigned=%0d",
             n_revote, n_host_clr, n_start_ignored, n_mode_diff);
    check("seen theta wrap", n_theta_wrap > 0, 1);
    check("seen pixel wrap", n_pixel_wrap > 0, 1);
    check("seen write in S3", n_wr_s3 > 0, 1);
    check("seen write in S2", n_wr_s2 > 0, 1);
    check("seen write in S6", n_wr_s6 > 0, 1);
    check("seen revote", n_revote > 0, 1);
    check("seen host clear", n_host_clr > 0, 1);
    check("seen start ignored", n_start_ignored > 0, 1);
    check("seen mode difference", n_mode_diff > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
