// tb_hough_datapath: drives the datapath's control word, theta and pixel
// index directly, in the order the controller uses, for random pixels and
// every 15th degree. After each load it compares the registers with values
// worked out here (sine/cosine from real arithmetic, rho from the line
// equation, counts from a reference accumulator), then reads every touched
// accumulator entry through the host port, clears them and checks that.
module tb_hough_datapath;
  import hough_pkg::*;
  logic clk = 0, rst;
  ctrl_t ctrl;
  angle_t theta;
  pix_addr_t xy;
  logic pix_we;
  pix_addr_t pix_waddr;
  coord_t pix_wx, pix_wy;
  logic host_sel, host_clr;
  rho_t host_addr;
  acc_t host_count, acc_out;
  angle_t host_theta, param_t_out;
  trig_t cos_out, sin_out;
  rho_t rho_out;
  coord_t x_out, y_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hough_datapath dut (.*);

  localparam int NPIX = 12;
  coord_t px [NPIX], py [NPIX];
  int     ref_cnt [int];
  int     ref_th  [int];

  function automatic int q127(real v);
    real a = 127.0 * v;
    if (a >= 0.0) return int'($floor(a + 0.5 + 1e-9));
    return -int'($floor(-a + 0.5 + 1e-9));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic step(ctrl_t c);
    @(negedge clk) ctrl = c;
    @(posedge clk);
    #1 ctrl = '0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t c;
    int ec, es, er, key, hits;
    real r;
    rst = 1; ctrl = '0; theta = '0; xy = '0; pix_we = 0; pix_waddr = '0;
    pix_wx = '0; pix_wy = '0; host_sel = 0; host_clr = 0; host_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // load pixels (two pixels share a line so that counts exceed 1)
    for (int i = 0; i < NPIX; i++) begin
      px[i] = 8'($urandom_range(0, 99));
      py[i] = 8'($urandom_range(0, 99));
    end
    px[1] = px[0]; py[1] = py[0];
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk);
      pix_we = 1; pix_waddr = pix_addr_t'(i); pix_wx = px[i]; pix_wy = py[i];
    end
    @(negedge clk) pix_we = 0;
    hits = 0;
    for (int i = 0; i < NPIX; i++) begin
      xy = pix_addr_t'(i);
      c = '0; c.ldX = 1; c.ldY = 1; step(c);
      check("x", x_out, px[i]);
      check("y", y_out, py[i]);
      for (int d = 0; d <= 180; d += 15) begin
        theta = angle_t'(d);
        c = '0; c.ldC = 1; c.ldS = 1; step(c);
        r = d * 3.14159265358979323846 / 180.0;
        ec = q127($cos(r)); es = q127($sin(r));
        check("cos", cos_out, ec);
        check("sin", sin_out, es);
        check("theta reg", param_t_out, d);
        c = '0; c.ldR = 1; step(c);
        er = (int'(px[i]) * ec + int'(py[i]) * es) & 16'hFFFF;
        check("rho", rho_out, er);
        key = er;
        c = '0; c.ldA = 1; c.ld1 = 1; step(c);
        check("acc read", acc_out, ref_cnt.exists(key) ? ref_cnt[key] : 0);
        if (ref_cnt.exists(key)) hits++;
        c = '0; c.wren = 1; step(c);
        ref_cnt[key] = ref_cnt.exists(key) ? ref_cnt[key] + 1 : 1;
        ref_th[key]  = d;
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no repeated rho"); end
    // read back through the host port
    @(negedge clk) host_sel = 1;
    foreach (ref_cnt[k]) begin
      host_addr = rho_t'(k); #1;
      check("count", host_count, ref_cnt[k]);
      check("theta", host_theta, ref_th[k]);
    end
    // an untouched entry
    host_addr = 16'hFFFF ^ rho_t'(er); #1;
    if (!ref_cnt.exists(int'(host_addr))) check("untouched", host_count, 0);
    // clear and re-read
    foreach (ref_cnt[k]) begin
      @(negedge clk) begin host_addr = rho_t'(k); host_clr = 1; end
    end
    @(negedge clk) host_clr = 0;
    foreach (ref_cnt[k]) begin
      host_addr = rho_t'(k); #1;
      check("cleared", host_count, 0);
    end
    $display("repeated rho hits %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
