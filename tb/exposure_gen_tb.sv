// Testbench for exposure_gen: two- and four-toggle settings, enable and
// polarity, checked at every pixel of several lines against the toggle
// regions computed here.
`timescale 1ns/1ps
module exposure_gen_tb;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] line_len;
  logic [3:0][15:0] tog;
  logic en, pol, sub_clk;
  int checks = 0, failures = 0;

  exposure_gen dut (.*);
  always #25 clk = ~clk;

  initial begin
    #100000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    #60 rst_n = 1;
    for (int it = 0; it < 24; it++) begin
      automatic int nt = (it % 2) ? 4 : 2;
      automatic int pos = 0;
      line_len = 16'($urandom_range(20, 200));
      tog = '0;
      for (int i = 0; i < nt; i++) begin
        pos = $urandom_range(pos + 1, pos + line_len / nt);
        tog[i] = 16'(pos);
      end
      en = (it % 5 != 4); pol = it[1];
      @(negedge clk); start = 1;
      @(posedge clk);
      for (int k = 0; k < 2 * line_len; k++) begin
        automatic int p = k % line_len;
        automatic bit a = ((p >= tog[0] && p < tog[1]) || (tog[2] < tog[3] && p >= tog[2] && p < tog[3])) && en;
        @(posedge clk); #1;
        checks++;
        if (sub_clk != (a ^ pol)) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d k=%0d", it, k);
        end
      end
      @(negedge clk); start = 0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
