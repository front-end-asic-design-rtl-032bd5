// Testbench for sync_gen: HD/VD for random line and frame sizes (and the
// document's example of a 20-pixel line and 2-line frame), with enables
// and polarities; checked at every pixel of two frames against the line
// and frame position computed here. Default polarity is active low.
`timescale 1ns/1ps
module sync_gen_tb;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] hd_len, vd_len, hd_rise, vd_rise;
  logic hd_en, hd_pol, vd_en, vd_pol;
  logic hd, vd, line_start, frame_start;
  int checks = 0, failures = 0;

  sync_gen dut (.*);
  always #25 clk = ~clk;

  initial begin
    #100000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    #60 rst_n = 1;
    for (int it = 0; it < 16; it++) begin
      if (it == 0) begin
        hd_len = 20; vd_len = 2; hd_rise = 3; vd_rise = 1;
        {hd_en, hd_pol, vd_en, vd_pol} = 4'b1010;
      end else begin
        hd_len  = 16'($urandom_range(5, 60));
        vd_len  = 16'($urandom_range(1, 6));
        hd_rise = 16'($urandom_range(0, hd_len));
        vd_rise = 16'($urandom_range(0, vd_len));
        {hd_en, hd_pol, vd_en, vd_pol} = 4'($urandom);
      end
      @(negedge clk); start = 1;
      @(posedge clk);
      for (int k = 0; k < 2 * hd_len * vd_len; k++) begin
        automatic int p = k % hd_len;
        automatic int l = (k / hd_len) % vd_len;
        automatic bit ha = hd_en && p < hd_rise;
        automatic bit va = vd_en && l < vd_rise;
        @(posedge clk); #1;
        checks++;
        if (hd != (ha ? hd_pol : !hd_pol) || vd != (va ? vd_pol : !vd_pol)
            || line_start != (p == 0) || frame_start != (k % (hd_len * vd_len) == 0)) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d k=%0d hd=%0b vd=%0b", it, k, hd, vd);
        end
      end
      @(negedge clk); start = 0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
