// Testbench for tap_calc: exhaustive over phase 0..359 and lock lengths
// 41..96, one input per clock; each output (3 cycles later) must equal
// NTAPS-1-N+D with D = floor(phase*N/360) and D = 0 mapped to N. Phases
// above 359 must give the last tap.
`timescale 1ns/1ps
module tap_calc_tb;
  logic clk = 0;
  logic [8:0] phase = 0;
  logic [6:0] n_lock = 96;
  logic [6:0] tap;
  int exp_q [$];
  int checks = 0, failures = 0;

  tap_calc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  always @(posedge clk) begin
    if (exp_q.size() == 4) begin
      automatic int e = exp_q.pop_front();
      if (e >= 0) begin
        checks++;
        if (tap != 7'(e)) begin failures++; if (failures < 10) $display("FAIL tap %0d exp %0d", tap, e); end
      end
    end
  end

  initial begin
    for (int n = 41; n <= 96; n++)
      for (int p = 0; p < 512; p += (p < 360 ? 1 : 37)) begin
        automatic int d = (p >= 360) ? n : (p * n) / 360;
        if (d == 0) d = n;
        @(negedge clk);
        phase = 9'(p); n_lock = 7'(n);
        exp_q.push_back(95 - n + d);
      end
    repeat (6) begin @(negedge clk); exp_q.push_back(-1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
