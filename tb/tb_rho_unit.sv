// tb_rho_unit: checks both multiplier readings of the sine/cosine samples.
// Signed: random inputs against x*c + y*s worked out here in integers.
// Unsigned: every rho printed in the output table of the 45-degree
// worked example on the eight example pixels, then random inputs.
module tb_rho_unit;
  import hough_pkg::*;
  coord_t x, y;
  trig_t  c, s;
  rho_t   rho_s, rho_u;
  int checks = 0, failures = 0;

  rho_unit #(.SIGNED_TRIG(1'b1)) u_s (.x, .y, .c, .s, .rho(rho_s));
  rho_unit #(.SIGNED_TRIG(1'b0)) u_u (.x, .y, .c, .s, .rho(rho_u));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // (x, y) pairs and the rho printed for 0, 45, 90, 135, 180 degrees
  int px [8] = '{0, 1, 2, 3, 3, 4, 4, 5};
  int py [8] = '{5, 4, 3, 2, 5, 1, 3, 5};
  int tab [8][5] = '{
    '{0, 450, 635, 450, 0},
    '{127, 450, 508, 526, 129},
    '{254, 450, 381, 602, 258},
    '{381, 450, 254, 678, 387},
    '{381, 720, 635, 948, 387},
    '{508, 450, 127, 754, 516},
    '{508, 630, 381, 934, 516},
    '{635, 900, 635, 1280, 645}};
  byte unsigned cs [5] = '{8'h7F, 8'h5A, 8'h00, 8'hA6, 8'h81};
  byte unsigned sn [5] = '{8'h00, 8'h5A, 8'h7F, 8'h5A, 8'h00};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int p = 0; p < 8; p++)
      for (int a = 0; a < 5; a++) begin
        x = 8'(px[p]); y = 8'(py[p]); c = trig_t'(cs[a]); s = trig_t'(sn[a]);
        #1;
        check($sformatf("table (%0d,%0d) a%0d", px[p], py[p], a), rho_u, tab[p][a]);
        e = px[p] * int'(c) + py[p] * int'(s);
        check($sformatf("signed (%0d,%0d) a%0d", px[p], py[p], a), rho_s, e & 16'hFFFF);
      end
    for (int n = 0; n < 5000; n++) begin
      x = 8'($urandom); y = 8'($urandom); c = trig_t'($urandom); s = trig_t'($urandom);
      if (n < 100) begin x = 8'($urandom_range(0, 99)); y = 8'($urandom_range(0, 99)); end
      #1;
      e = int'(x) * int'(c) + int'(y) * int'(s);
      check("signed random", rho_s, e & 16'hFFFF);
      e = int'(x) * int'($unsigned(c)) + int'(y) * int'($unsigned(s));
      check("unsigned random", rho_u, e & 16'hFFFF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
