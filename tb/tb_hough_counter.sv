// tb_hough_counter: runs the 1-degree and the 45-degree counters through
// whole sweeps with random stepping, comparing theta, the pixel index and
// both "last" flags against counters kept here; also checks hold, clear
// and reset.
module tb_hough_counter;
  import hough_pkg::*;
  logic clk = 0, rst, clr, ld1, ld2;
  pix_addr_t max_pixel;
  angle_t    th1, th45;
  pix_addr_t xy1, xy45;
  logic tl1, pl1, tl45, pl45;
  int checks = 0, failures = 0;
  int wraps_theta = 0, wraps_pixel = 0;

  always #5 clk = ~clk;

  hough_counter #(.THETA_STEP(1)) u1 (
    .clk, .rst, .clr, .ld1, .ld2, .max_pixel,
    .theta(th1), .xy(xy1), .theta_last(tl1), .pixel_last(pl1));
  hough_counter #(.THETA_STEP(45)) u45 (
    .clk, .rst, .clr, .ld1, .ld2, .max_pixel,
    .theta(th45), .xy(xy45), .theta_last(tl45), .pixel_last(pl45));

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

  int e1, e45, ep;  // expected theta (1 and 45 degree) and pixel index

  initial begin
    rst = 1; clr = 0; ld1 = 0; ld2 = 0; max_pixel = 8'd6;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    e1 = 0; e45 = 0; ep = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      check("theta1", th1, e1);
      check("theta45", th45, e45);
      check("xy", xy1, ep);
      check("xy45", xy45, ep);
      check("theta_last1", tl1, e1 == 180);
      check("theta_last45", tl45, e45 == 180);
      check("pixel_last", pl1, ep == int'(max_pixel));
      ld1 = ($urandom_range(0, 3) != 0);
      ld2 = ($urandom_range(0, 7) == 0);
      clr = (n == 2500);
      @(posedge clk);
      if (clr) begin
        e1 = 0; e45 = 0; ep = 0;
      end else begin
        if (ld1) begin
          if (e1 == 180) wraps_theta++;
          e1  = (e1 == 180) ? 0 : e1 + 1;
          e45 = (e45 == 180) ? 0 : e45 + 45;
        end
        if (ld2) begin
          if (ep == int'(max_pixel)) wraps_pixel++;
          ep = (ep == int'(max_pixel)) ? 0 : ep + 1;
        end
      end
    end
    @(negedge clk) begin ld1 = 0; ld2 = 0; clr = 0; end
    checks++;
    if (wraps_theta == 0 || wraps_pixel == 0) begin
      failures++; $display("FAIL no wrap seen");
    end
    // reset clears
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    check("reset theta", th1, 0);
    check("reset xy", xy1, 0);
    $display("theta wraps %0d pixel wraps %0d", wraps_theta, wraps_pixel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
