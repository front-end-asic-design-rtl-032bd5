// Testbench for config_mem: writes random data to every address, then
// reads all back in random order and checks the one-cycle read latency
// against a reference array.
`timescale 1ns/1ps
module config_mem_tb;
  logic clk = 0, we = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] ref_m [1024];
  int checks = 0, failures = 0;

  config_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); we = 1; waddr = 10'(a); wdata = 16'($urandom); ref_m[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic logic [9:0] a = 10'($urandom);
      raddr = a;
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_m[a]) begin
        failures++; $display("FAIL addr %0d got %h exp %h", a, rdata, ref_m[a]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
