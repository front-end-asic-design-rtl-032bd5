// Testbench for hclk_coarse: random rise/fall/period settings (including
// rise == fall and wrapping windows); after start, the coarse output at
// pixel k must equal the window test of k mod (period+1), computed here;
// fix must equal (rise == fall); dropping start returns to idle (low).
`timescale 1ns/1ps
module hclk_coarse_tb;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] rise, fall, period;
  logic coarse, fix;
  int checks = 0, failures = 0;
  int n_fix = 0, n_wrap = 0;

  hclk_coarse dut (.*);
  always #25 clk = ~clk;

  function automatic bit model(input int c, input int r, input int f);
    if (r < f)  return c >= r && c < f;
    if (r == f) return c == r;
    return c >= r || c < f;
  endfunction

  initial begin
    #10000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    #60 rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      period = 5'($urandom_range(0, 31));
      rise   = 5'($urandom_range(0, period));
      fall   = (it % 4 == 0) ? rise : 5'($urandom_range(0, period));
      if (rise == fall) n_fix++;
      if (rise > fall) n_wrap++;
      @(negedge clk); start = 1;
      @(posedge clk);
      for (int k = 0; k < 3 * (period + 1) + 5; k++) begin
        @(posedge clk); #1;
        checks++;
        if (coarse != model(k % (period + 1), rise, fall)) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d r=%0d f=%0d k=%0d got %0b", period, rise, fall, k, coarse);
        end
      end
      checks++; if (fix != (rise == fall)) failures++;
      @(negedge clk); start = 0;
      @(posedge clk); @(posedge clk); #1;
      checks++; if (coarse != 0) failures++;
    end
    if (n_fix == 0 || n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
