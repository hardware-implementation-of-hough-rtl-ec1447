// tb_pixel_ram: writes random coordinates to random addresses, keeps a
// reference copy, and reads every address back, including reads of an
// address in the same cycle as a write to another one.
module tb_pixel_ram;
  logic clk = 0;
  logic we;
  logic [7:0] waddr, wdata, raddr, rdata;
  logic [7:0] ref_mem [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pixel_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 256; i++) ref_mem[i] = 8'h00;
    // initial contents are zero
    for (int i = 0; i < 256; i += 17) begin
      raddr = 8'(i); #1;
      checks++; if (rdata !== 8'h00) begin failures++; $display("FAIL init %0d", i); end
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we    = 1;
      waddr = 8'($urandom);
      wdata = 8'($urandom);
      raddr = 8'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++; $display("FAIL read %0d got %h exp %h", raddr, rdata, ref_mem[raddr]);
      end
      @(posedge clk);
      ref_mem[waddr] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); #1;
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
