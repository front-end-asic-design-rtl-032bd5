// Testbench for phase_detector: a 50 ns reference clock and a feedback
// clock delayed by a swept amount. Expected (from the document's timing
// diagram): up low for lags up to 180 degrees, high between 180 and 360,
// low again once aligned (lag of a full period). Also checks up_xor and the
// synchronous reset.
`timescale 1ns/1ps
module phase_detector_tb;
  localparam real T = 50.0;
  logic ref_clk = 0, fbk_clk = 0, rst_n = 0;
  logic up_xor, up;
  real lag = 5.0;
  int checks = 0, failures = 0;

  phase_detector dut (.*);
  always #(T/2) ref_clk = ~ref_clk;
  always @(posedge ref_clk) begin
    fork
      begin
        automatic real l = lag;
        #(l) fbk_clk = 1'b1;
        #(T/2) fbk_clk = 1'b0;
      end
    join_none
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    repeat (3) @(posedge ref_clk);
    #1 chk(up == 0, "reset holds up low");
    rst_n = 1;
    for (int k = 1; k < 40; k++) begin
      lag = k * 1.3;                 // 1.3 .. 50.7 ns
      repeat (4) @(posedge ref_clk);
      #0.1;
      chk(up == ((lag > T/2) && (lag < T)), $sformatf("lag %0.1f up=%0b", lag, up));
      #(T/4);
      chk(up_xor == (ref_clk ^ fbk_clk), "up_xor");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
