// tb_acc_ram: read-increment-write traffic on the full 65536 x 16 RAM, as
// the accumulator sees it, against a reference array; also checks that
// the contents start at zero and that a write of zero clears an entry.
module tb_acc_ram;
  logic clk = 0;
  logic [15:0] addr;
  logic we;
  logic [15:0] wdata, rdata;
  logic [15:0] ref_mem [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  acc_ram dut (.clk, .addr, .we, .wdata, .rdata);

  function automatic logic [15:0] ref_rd(logic [15:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : 16'h0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 65536; i += 4099) begin
      addr = 16'(i); #1;
      checks++; if (rdata !== 16'h0) begin failures++; $display("FAIL init %0d", i); end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr = 16'($urandom_range(0, 63)) * 16'd1021;  // few addresses, many hits
      we   = ($urandom_range(0, 9) != 0);
      #1;
      checks++;
      if (rdata !== ref_rd(addr)) begin
        failures++; $display("FAIL read %h got %0d exp %0d", addr, rdata, ref_rd(addr));
      end
      wdata = (n % 500 == 499) ? 16'h0 : rdata + 16'd1;
      @(posedge clk);
      if (we) ref_mem[addr] = wdata;
    end
    @(negedge clk) we = 0;
    foreach (ref_mem[a]) begin
      addr = a; #1;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("FAIL final %h", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
