// tb_trig_rom: checks both tables entry by entry.
// Expected values are computed here with real arithmetic:
// round(127*sin/cos(d degrees)), halves away from zero, for d <= 180, and
// zero above. Also checks the five samples of the 45-degree example.
module tb_trig_rom;
  import hough_pkg::*;
  logic [7:0] addr;
  trig_t cos_d, sin_d;
  int checks = 0, failures = 0;

  trig_rom #(.FN(TRIG_COS)) u_cos (.addr(addr), .data(cos_d));
  trig_rom #(.FN(TRIG_SIN)) u_sin (.addr(addr), .data(sin_d));

  function automatic int q127(real v);
    real a = 127.0 * v;
    if (a >= 0.0) return int'($floor(a + 0.5 + 1e-9));
    return -int'($floor(-a + 0.5 + 1e-9));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ec, es;
    real r;
    for (int d = 0; d < 256; d++) begin
      addr = 8'(d);
      #1;
      r  = d * 3.14159265358979323846 / 180.0;
      ec = (d <= 180) ? q127($cos(r)) : 0;
      es = (d <= 180) ? q127($sin(r)) : 0;
      check($sformatf("cos[%0d]", d), int'(cos_d), ec);
      check($sformatf("sin[%0d]", d), int'(sin_d), es);
    end
    // the samples of the 45-degree worked example
    addr = 8'd0;   #1; check("cos0", cos_d, 127);   check("sin0", sin_d, 0);
    addr = 8'd45;  #1; check("cos45", cos_d, 90);  check("sin45", sin_d, 90);
    addr = 8'd90;  #1; check("cos90", cos_d, 0);  check("sin90", sin_d, 127);
    addr = 8'd135; #1; check("cos135", cos_d, -90); check("sin135", sin_d, 90);
    addr = 8'd180; #1; check("cos180", cos_d, -127); check("sin180", sin_d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
