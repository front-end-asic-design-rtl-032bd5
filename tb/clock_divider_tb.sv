// Testbench for clock_divider: for every divisor 0..31 measures the pixel
// clock period and high time in input-clock half periods (expected: period
// N input cycles with N clamped to 20 and 0/1 giving the input clock, high
// time exactly half), and checks that clkrefby2 has twice the pixel period.
`timescale 1ns/1ps
module clock_divider_tb;
  logic clk_in = 0, rst_n = 0;
  logic [4:0] divisor_in = 0;
  logic pixel_clk, clkrefby2;
  int checks = 0, failures = 0;
  localparam real TIN = 10.0;

  clock_divider dut (.*);
  always #(TIN/2) clk_in = ~clk_in;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    realtime r0, f0, r1, r2, q0, q1;
    for (int d = 0; d < 32; d++) begin
      automatic int n = (d > 20) ? 20 : (d <= 1 ? 1 : d);
      rst_n = 0; divisor_in = 5'(d);
      #(3*TIN); rst_n = 1;
      repeat (3) @(posedge pixel_clk);
      r0 = $realtime; @(negedge pixel_clk); f0 = $realtime;
      @(posedge pixel_clk); r1 = $realtime;
      @(posedge pixel_clk); r2 = $realtime;
      chk(r1 - r0 == n*TIN && r2 - r1 == n*TIN, $sformatf("div %0d period %0t exp %0t", d, r1 - r0, n*TIN));
      chk(f0 - r0 == n*TIN/2, $sformatf("div %0d high %0t exp %0t", d, f0 - r0, n*TIN/2));
      @(posedge clkrefby2) q0 = $realtime;
      @(posedge clkrefby2) q1 = $realtime;
      chk(q1 - q0 == 2*n*TIN, $sformatf("div %0d clkrefby2", d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
