// Testbench for dll_controller: the phase detector and delay line are
// replaced by an ideal model (up = the loop delay count*U lies strictly
// between half a period and a period). For several pixel periods the
// controller must lock at the smallest count with count*U >= T, within
// SETTLE + (N - INIT) + 2 cycles, keep control one-hot at element
// NTAPS-count, and hold the count once locked.
`timescale 1ns/1ps
module dll_controller_tb;
  localparam real U = 0.62;
  logic clk = 0, rst_n = 0;
  logic up;
  logic [6:0] count;
  logic [95:0] control;
  logic lock;
  real T;
  int checks = 0, failures = 0;

  dll_controller dut (.*);
  always #50 clk = ~clk;
  always_comb up = (count * U > T/2) && (count * U < T);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    real periods [5] = '{50.0, 31.0, 45.3, 58.9, 40.0};
    foreach (periods[i]) begin
      automatic int n_exp = $rtoi($ceil(periods[i] / U));
      automatic int cyc = 0;
      T = periods[i];
      rst_n = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      while (!lock && cyc < 200) begin @(posedge clk); #1 cyc++; end
      chk(count == n_exp, $sformatf("T=%0.1f count %0d exp %0d", T, count, n_exp));
      chk(cyc <= 4 + (n_exp - 48) + 2, $sformatf("lock time %0d", cyc));
      chk($onehot(control) && control[96 - count], "one-hot entry select");
      repeat (10) @(posedge clk);
      chk(lock && count == n_exp, "holds lock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
