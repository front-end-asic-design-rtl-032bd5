// Testbench for mask_gen: 2-, 4- and 6-toggle settings (unused toggles 0),
// enable and polarity; active and out at every pixel of several lines are
// compared with the region test computed here.
`timescale 1ns/1ps
module mask_gen_tb;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] line_len;
  logic [5:0][15:0] tog;
  logic en, pol, active, out;
  int checks = 0, failures = 0;

  mask_gen dut (.*);
  always #25 clk = ~clk;

  function automatic bit model(input int p);
    bit a = 0;
    for (int i = 0; i < 3; i++) if (tog[2*i] < tog[2*i+1] && p >= tog[2*i] && p < tog[2*i+1]) a = 1;
    return a && en;
  endfunction

  initial begin
    #100000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    #60 rst_n = 1;
    for (int it = 0; it < 30; it++) begin
      automatic int nt = 2 * (1 + it % 3);
      automatic int pos = 0;
      line_len = 16'($urandom_range(30, 200));
      tog = '0;
      for (int i = 0; i < nt; i++) begin
        pos = $urandom_range(pos + 1, pos + line_len / nt);
        tog[i] = 16'(pos);
      end
      en = (it % 7 != 3); pol = it[0];
      @(negedge clk); start = 1;
      @(posedge clk);
      for (int k = 0; k < 2 * line_len; k++) begin
        @(posedge clk); #1;
        checks++;
        if (active != model(k % line_len) || out != (model(k % line_len) ^ pol)) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d k=%0d active=%0b", it, k, active);
        end
      end
      @(negedge clk); start = 0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
