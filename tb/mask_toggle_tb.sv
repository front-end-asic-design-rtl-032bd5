// Testbench for mask_toggle: toggle_en must be high from the programmed
// position to the end of each line when enabled, low otherwise.
`timescale 1ns/1ps
module mask_toggle_tb;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] hd_len, tog_pos;
  logic en, toggle_en;
  int checks = 0, failures = 0;

  mask_toggle dut (.*);
  always #25 clk = ~clk;

  initial begin
    #100000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    #60 rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      hd_len  = 16'($urandom_range(10, 200));
      tog_pos = 16'($urandom_range(0, hd_len - 1));
      en = (it % 5 != 2);
      @(negedge clk); start = 1;
      @(posedge clk);
      for (int k = 0; k < 3 * hd_len; k++) begin
        @(posedge clk); #1;
        checks++;
        if (toggle_en != (en && (k % hd_len) >= tog_pos)) begin
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
