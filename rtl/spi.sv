// SPI serial-to-parallel converter.
//
// While load is low, one bit of s_data is shifted in, MSB first, at every
// rising edge of s_clk. After 17 bits the word is copied to data_reg and
// word_tgl flips, telling the memory interface (in the master clock domain)
// that a new word is ready. Bit 16 of the word is the address/data flag
// (0 = address, 1 = data), as in the document; the toggle handshake towards
// the master clock is this design's choice. Raising load abandons a partial
// word and holds data_reg. rst_n (active low power-on reset) clears data_reg.
`timescale 1ns/1ps
module spi #(
  parameter int unsigned WORD_W = 17
) (
  input  logic              s_clk,
  input  logic              rst_n,
  input  logic              load,     // active low
  input  logic              s_data,
  output logic [WORD_W-1:0] data_reg,
  output logic              word_tgl
);
  logic [WORD_W-2:0]        shreg;
  logic [$clog2(WORD_W)-1:0] bitcnt;

  always_ff @(posedge s_clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg    <= '0;
      bitcnt   <= '0;
      data_reg <= '0;
      word_tgl <= 1'b0;
    end else if (load) begin
      bitcnt <= '0;
    end else if (bitcnt == $clog2(WORD_W)'(WORD_W - 1)) begin
      data_reg <= {shreg, s_data};
      word_tgl <= ~word_tgl;
      bitcnt   <= '0;
    end else begin
      shreg  <= {shreg[WORD_W-3:0], s_data};
      bitcnt <= bitcnt + 1'b1;
    end
  end
endmodule
