// tb_hough_full: the engine at its default size (1-degree step, 181 angles,
// 65536-entry accumulators, signed sine/cosine) on constructed 100 x 100
// line images, the kind of test image the design was evaluated on:
//   image 1: the diagonal y = 99 - x (100 pixels) plus 20 random pixels
//   image 2: the horizontal y = 30 and the vertical x = 70 (199 pixels)
//   image 3: two lane markings converging towards the top of the image,
//            drawn by rounding (not exactly collinear), 200 pixels
//   image 4: two diagonal segments in a V with scattered dots
//   image 5: one diagonal segment, scattered dots and two small circles
// For each image it loads the pixels, runs one transform, checks the done
// cycle (2 + 544 * pixels), reads all 65536 accumulator entries and
// compares them with a reference accumulator computed here from real
// sine/cosine, checks that each drawn straight line holds all its votes
// and that the strongest bin is one of them, and clears the accumulator
// for the next image.
module tb_hough_full;
  import hough_pkg::*;
  logic clk = 0, rst, start;
  pix_addr_t max_pixel;
  logic pix_we;
  pix_addr_t pix_waddr;
  coord_t pix_wx, pix_wy;
  rho_t host_addr;
  logic host_clr;
  acc_t host_count, acc;
  angle_t host_theta, param_t_out;
  logic done;
  state_e state;
  trig_t cos_out, sin_out;
  rho_t rho;
  coord_t x_out, y_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hough_top dut (.*);

  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  int tc [181], ts [181];
  int ref_cnt [65536];
  int ref_th  [65536];
  int qx [$], qy [$];

  function automatic int q127(real v);
    real a = 127.0 * v;
    if (a >= 0.0) return int'($floor(a + 0.5 + 1e-9));
    return -int'($floor(-a + 0.5 + 1e-9));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void add_px(int x, int y);
    foreach (qx[i]) if (qx[i] == x && qy[i] == y) return;
    qx.push_back(x); qy.push_back(y);
  endfunction

  function automatic int rho_of(int x, int y, int d);
    return (x * tc[d] + y * ts[d]) & 16'hFFFF;
  endfunction

  task automatic run_image(string name, int peaks [$], int min_votes);
    int t0, p, bad, peak, peak_rho;
    p = qx.size();
    for (int i = 0; i < 65536; i++) begin ref_cnt[i] = 0; ref_th[i] = 0; end
    foreach (qx[i])
      for (int d = 0; d <= 180; d++) begin
        ref_cnt[rho_of(qx[i], qy[i], d)]++;
        ref_th[rho_of(qx[i], qy[i], d)] = d;
      end
    for (int i = 0; i < p; i++) begin
      @(negedge clk);
      pix_we = 1; pix_waddr = pix_addr_t'(i); pix_wx = coord_t'(qx[i]); pix_wy = coord_t'(qy[i]);
    end
    @(negedge clk) begin pix_we = 0; max_pixel = pix_addr_t'(p - 1); start = 1; end
    t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    check({name, " cycles"}, cyc - t0, 2 + p * (1 + 3 * 181));
    @(negedge clk);
    bad = 0; peak = 0; peak_rho = 0;
    for (int a = 0; a < 65536; a++) begin
      host_addr = rho_t'(a);
      #1;
      checks++;
      if (host_count != acc_t'(ref_cnt[a]) || (ref_cnt[a] != 0 && host_theta != angle_t'(ref_th[a]))) begin
        bad++; failures++;
        if (bad < 5) $display("FAIL %s entry %0d: %0d/%0d expected %0d/%0d", name, a,
                              host_count, host_theta, ref_cnt[a], ref_th[a]);
      end
      if (int'(host_count) > peak) begin peak = int'(host_count); peak_rho = a; end
    end
    $display("%s: %0d pixels, %0d cycles, peak %0d votes at rho %0d (theta of last vote %0d)",
             name, p, 2 + p * 544, peak, $signed(16'(peak_rho)), ref_th[peak_rho]);
    // each straight line in the image holds all of its pixels' votes
    foreach (peaks[i]) begin
      host_addr = rho_t'(peaks[i]); #1;
      check($sformatf("%s line at rho %0d", name, peaks[i]), int'(host_count >= acc_t'(min_votes)), 1);
    end
    // the strongest bin is one of the drawn lines
    if (peaks.size() > 0) begin
      int found = 0;
      foreach (peaks[i]) if (peaks[i] == peak_rho) found = 1;
      check($sformatf("%s global peak on a line", name), found, 1);
    end
    // clear for the next image
    for (int a = 0; a < 65536; a++)
      if (ref_cnt[a] != 0) begin
        @(negedge clk) begin host_addr = rho_t'(a); host_clr = 1; end
      end
    @(negedge clk) host_clr = 0;
  endtask

  initial begin
    real r;
    for (int d = 0; d <= 180; d++) begin
      r = d * 3.14159265358979323846 / 180.0;
      tc[d] = q127($cos(r)); ts[d] = q127($sin(r));
    end
    rst = 1; start = 0; max_pixel = '0; pix_we = 0; pix_waddr = '0; pix_wx = '0;
    pix_wy = '0; host_addr = '0; host_clr = 0; cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // image 1: diagonal plus noise; all 100 line pixels vote rho = 99*90 at 45
    qx.delete(); qy.delete();
    for (int x = 0; x < 100; x++) add_px(x, 99 - x);
    while (qx.size() < 120) add_px($urandom_range(0, 99), $urandom_range(0, 99));
    run_image("image 1", '{99 * 90}, 100);

    // image 2: horizontal y = 30 (theta 90, rho 30*127) and vertical x = 70
    // (theta 0, rho 70*127)
    qx.delete(); qy.delete();
    for (int x = 0; x < 100; x++) add_px(x, 30);
    for (int y = 0; y < 100; y++) add_px(70, y);
    run_image("image 2", '{30 * 127, 70 * 127}, 100);

    // image 3: two lane markings, (10,0)-(45,99) and (90,0)-(55,99)
    qx.delete(); qy.delete();
    for (int y = 0; y < 100; y++) begin
      add_px(10 + (35 * y + 49) / 99, y);
      add_px(90 - (35 * y + 49) / 99, y);
    end
    run_image("image 3", '{}, 0);

    // image 4: two diagonal segments opening to the left, with scattered
    // dots: x + y = 70 for x = 25..65 (theta 45, rho 70*90) and
    // y - x = 20 for x = 35..70 (theta 135, rho 20*90)
    qx.delete(); qy.delete();
    for (int x = 25; x <= 65; x++) add_px(x, 70 - x);
    for (int x = 35; x <= 70; x++) add_px(x, x + 20);
    while (qx.size() < 77 + 15) add_px($urandom_range(0, 99), $urandom_range(0, 99));
    run_image("image 4", '{70 * 90, 20 * 90}, 36);

    // image 5: one diagonal x + y = 100 for x = 15..70, scattered dots and
    // two small circles of radius 4
    qx.delete(); qy.delete();
    for (int x = 15; x <= 70; x++) add_px(x, 100 - x);
    for (int a = 0; a < 360; a += 15) begin
      r = a * 3.14159265358979323846 / 180.0;
      add_px(15 + int'($floor(4.0 * $cos(r) + 0.5)), 20 + int'($floor(4.0 * $sin(r) + 0.5)));
      add_px(80 + int'($floor(4.0 * $cos(r) + 0.5)), 75 + int'($floor(4.0 * $sin(r) + 0.5)));
    end
    for (int n = 0; n < 20; n++) add_px($urandom_range(30, 80), $urandom_range(10, 60));
    run_image("image 5", '{100 * 90}, 56);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
