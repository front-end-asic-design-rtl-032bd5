// Testbench for the delay_line model: for several entry points and taps,
// measures the delay from a clk_in rising edge to the tap's rising edge
// and compares with (tap - entry + 1) unit delays; taps before the entry
// must stay high.
`timescale 1ns/1ps
module delay_line_tb;
  localparam real U = 0.62;
  logic clk_in = 0;
  logic [95:0] control = '0;
  logic [95:0] taps;
  int checks = 0, failures = 0;

  delay_line dut (.*);
  always #25 clk_in = ~clk_in;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    int entries [4] = '{15, 0, 40, 95};
    foreach (entries[e]) begin
      control = '0; control[entries[e]] = 1'b1;
      repeat (4) @(posedge clk_in);
      for (int j = entries[e]; j < 96; j += 7) begin
        automatic realtime t0, t1;
        automatic real exp_d;
        @(posedge clk_in); t0 = $realtime;
        @(posedge taps[j]); t1 = $realtime;
        exp_d = (j - entries[e] + 1) * U;
        if (exp_d >= 50.0) exp_d -= 50.0;   // edge of the previous input period
        chk((t1 - t0) > exp_d - 0.01 && (t1 - t0) < exp_d + 0.01,
            $sformatf("entry %0d tap %0d delay %0.3f", entries[e], j, t1 - t0));
      end
      if (entries[e] > 0) chk(taps[entries[e]-1] == 1'b1, "taps before entry are high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
