// Testbench for clk_mask: all input combinations against the rule
// "inside an enabled masking region the output is the toggle level,
// otherwise the clock".
`timescale 1ns/1ps
module clk_mask_tb;
  logic clk_in, mask, mask_en, tog_en, tog_state, clk_out;
  int checks = 0, failures = 0;
  clk_mask dut (.*);
  initial begin
    #1000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      {clk_in, mask, mask_en, tog_en, tog_state} = 5'(v);
      #1;
      checks++;
      if (clk_out != ((mask && mask_en) ? (tog_en && tog_state) : clk_in)) begin
        failures++; $display("FAIL v=%b out=%b", 5'(v), clk_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
