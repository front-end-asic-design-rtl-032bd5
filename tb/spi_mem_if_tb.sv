// Testbench for spi_mem_if: presents words from a slow serial domain
// (a new word every 17 serial clocks), checks that flag-0 words load wadd,
// flag-1 words load dataout with a single we pulse, en pulses once per word,
// and outputs appear within 5 clk cycles.
`timescale 1ns/1ps
module spi_mem_if_tb;
  logic clk = 0, rst_n = 0;
  logic [16:0] data_reg = '0;
  logic word_tgl = 0;
  logic [9:0] wadd;
  logic [15:0] dataout;
  logic en, we;
  int checks = 0, failures = 0;
  int n_we = 0, n_en = 0;

  spi_mem_if dut (.*);
  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    if (we) n_we++;
    if (en) n_en++;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    #100; chk(wadd == 0 && dataout == 0 && !we && !en, "reset values");
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      automatic logic [16:0] w = 17'($urandom);
      automatic int we0 = n_we, en0 = n_en;
      automatic logic [9:0] a0 = wadd; automatic logic [15:0] d0 = dataout;
      data_reg = w; word_tgl = ~word_tgl;
      repeat (5) @(posedge clk);
      #1;
      chk(n_en == en0 + 1, "one en per word");
      if (w[16]) begin
        chk(dataout == w[15:0] && wadd == a0, "data word loads dataout");
        chk(n_we == we0 + 1, "one we per data word");
      end else begin
        chk(wadd == w[9:0] && dataout == d0, "address word loads wadd");
        chk(n_we == we0, "no we on address word");
      end
      repeat (60) @(posedge clk);   // rest of 17 serial bits
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
