// Testbench for vclk_coarse: random line length, rise/fall, pattern start,
// length and repeat count (including length 0 = whole line). Expected
// output at each pixel is computed arithmetically here: position p in the
// line, q = p - start; inside the sequence when 0 <= q < len*rep; pattern
// pixel q mod len; window test on that. Includes the document's example
// (rise 16, fall 34, repeated 4 times).
`timescale 1ns/1ps
module vclk_coarse_tb;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] line_len, rise, fall, pstart, plen, prep;
  logic coarse, fix;
  int checks = 0, failures = 0;

  vclk_coarse dut (.*);
  always #25 clk = ~clk;

  function automatic bit model(input int p);
    int l   = (plen == 0) ? line_len : plen;
    int rep = (prep == 0) ? 1 : prep;
    int q   = p - pstart;
    int c;
    if (q < 0 || q >= l * rep) return 0;
    c = q % l;
    if (rise < fall)  return c >= rise && c < fall;
    if (rise == fall) return c == rise;
    return c >= rise || c < fall;
  endfunction

  initial begin
    #100000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    #60 rst_n = 1;
    for (int it = 0; it < 30; it++) begin
      if (it == 0) begin
        line_len = 220; rise = 16; fall = 34; pstart = 10; plen = 50; prep = 4;
      end else begin
        line_len = 16'($urandom_range(20, 300));
        plen   = (it % 5 == 1) ? 16'd0 : 16'($urandom_range(2, 60));
        prep   = 16'($urandom_range(0, 6));
        pstart = 16'($urandom_range(0, line_len - 1));
        rise   = 16'($urandom_range(0, 40));
        fall   = (it % 6 == 2) ? rise : 16'($urandom_range(0, 40));
      end
      @(negedge clk); start = 1;
      @(posedge clk);
      for (int k = 0; k < 3 * line_len; k++) begin
        @(posedge clk); #1;
        checks++;
        if (coarse != model(k % line_len)) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d L=%0d r=%0d f=%0d s=%0d len=%0d rep=%0d k=%0d got %0b",
                                      it, line_len, rise, fall, pstart, plen, prep, k, coarse);
        end
      end
      checks++; if (fix != (rise == fall)) failures++;
      @(negedge clk); start = 0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
