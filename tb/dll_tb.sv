// Testbench for the DLL (phase detector + controller + delay line) at
// pixel periods of 50 ns (20 MHz, the document's rate) and 37 ns. Checks
// lock, the locked length N = ceil(T / 0.62 ns), the lock time in
// clkrefby2 cycles, that the feedback (last tap) lags the reference by
// less than one unit delay beyond a full period, and that tap NTAPS-N+k-1
// lags the pixel clock by k unit delays (~620 ps resolution).
`timescale 1ns/1ps
module dll_tb;
  localparam real U = 0.62;
  logic ref_clk = 0, clkrefby2 = 0, rst_n = 0;
  logic [95:0] taps;
  logic [6:0] count;
  logic up, lock;
  real T = 50.0;
  int checks = 0, failures = 0;

  dll dut (.*);
  always #(T/2) ref_clk = ~ref_clk;
  always @(posedge ref_clk) clkrefby2 <= ~clkrefby2;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    real periods [2] = '{50.0, 37.0};
    foreach (periods[i]) begin
      automatic int n_exp, cyc = 0;
      T = periods[i];
      n_exp = $rtoi($ceil(T / U));
      rst_n = 0;
      repeat (4) @(posedge clkrefby2);
      rst_n = 1;
      while (!lock && cyc < 300) begin @(posedge clkrefby2); cyc++; end
      chk(lock, "locks");
      chk(count == n_exp, $sformatf("T=%0.1f N=%0d exp %0d", T, count, n_exp));
      chk(cyc <= 4 + (n_exp - 48) + 3, $sformatf("lock time %0d clkrefby2 cycles", cyc));
      repeat (4) @(posedge ref_clk);
      for (int k = 1; k <= n_exp; k += 5) begin
        automatic realtime t0, t1;
        automatic real e = k * U;
        if (e >= T) e -= T;
        @(posedge ref_clk); t0 = $realtime;
        @(posedge taps[96 - n_exp + k - 1]); t1 = $realtime;
        chk((t1 - t0) > e - 0.01 && (t1 - t0) < e + 0.01, $sformatf("tap k=%0d lag %0.3f exp %0.3f", k, t1 - t0, e));
      end
      begin
        automatic realtime t0, t1;
        @(posedge ref_clk); t0 = $realtime;
        @(posedge taps[95]); t1 = $realtime;
        chk(t1 - t0 >= 0.0 && t1 - t0 < U, $sformatf("feedback residual %0.3f", t1 - t0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
