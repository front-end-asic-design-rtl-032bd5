// Testbench for spi: shifts random 17-bit words in MSB first, checks that
// each appears on data_reg with word_tgl flipping after exactly 17 s_clk
// rising edges, that a raised load abandons a partial word and holds
// data_reg, and that reset clears data_reg.
`timescale 1ns/1ps
module spi_tb;
  logic s_clk = 0, rst_n = 0, load = 1, s_data = 0;
  logic [16:0] data_reg;
  logic word_tgl;
  int checks = 0, failures = 0;

  spi dut (.*);

  always #50 s_clk = ~s_clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [16:0] w, input int nbits);
    for (int i = 16; i > 16 - nbits; i--) begin
      s_data = w[i]; @(negedge s_clk);
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    logic t0;
    #120; chk(data_reg == 0 && word_tgl == 0, "reset clears data_reg");
    rst_n = 1;
    @(negedge s_clk); load = 0;
    for (int n = 0; n < 20; n++) begin
      automatic logic [16:0] w = 17'($urandom);
      t0 = word_tgl;
      // after 16 bits nothing may change yet
      for (int i = 16; i >= 1; i--) begin s_data = w[i]; @(negedge s_clk); end
      chk(word_tgl == t0, "no word before 17th bit");
      s_data = w[0];
      @(negedge s_clk);
      chk(word_tgl != t0, "word_tgl flips after 17 bits");
      chk(data_reg == w, $sformatf("data_reg %h exp %h", data_reg, w));
    end
    // partial word then load high
    t0 = word_tgl;
    begin
      automatic logic [16:0] keep = data_reg;
      send(17'h1ABCD, 9);
      load = 1;
      repeat (30) @(negedge s_clk);
      chk(word_tgl == t0 && data_reg == keep, "load high holds data_reg");
      load = 0;
      send(17'h0_1234, 17);
      chk(data_reg == 17'h0_1234, "new word after abandoned partial word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
