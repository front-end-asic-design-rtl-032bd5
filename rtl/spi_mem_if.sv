// SPI to memory interface.
//
// Brings each completed 17-bit SPI word into the master clock domain and
// splits it by its flag bit: flag 0 loads the write address (wadd), flag 1
// loads the write data (dataout) and raises we for one cycle so that the
// configuration memory stores dataout at wadd. en pulses for one cycle for
// every word, address or data, as in the SPI timing diagram.
// The word toggle from the s_clk domain passes a three-flop synchronizer; the
// word itself is stable for the 17 s_clk cycles of the next word, so clk must
// be at least a few times faster than s_clk (this design's assumption).
// Outputs appear 3 to 4 clk cycles after the last serial bit.
`timescale 1ns/1ps
module spi_mem_if #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W:0]   data_reg,
  input  logic              word_tgl,
  output logic [ADDR_W-1:0] wadd,
  output logic [DATA_W-1:0] dataout,
  output logic              en,
  output logic              we
);
  logic [2:0] tsync;
  logic       new_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tsync <= '0;
    else        tsync <= {tsync[1:0], word_tgl};
  end
  assign new_word = tsync[2] ^ tsync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wadd    <= '0;
      dataout <= '0;
      en      <= 1'b0;
      we      <= 1'b0;
    end else begin
      en <= new_word;
      we <= new_word & data_reg[DATA_W];
      if (new_word) begin
        if (data_reg[DATA_W]) dataout <= data_reg[DATA_W-1:0];
        else                  wadd    <= data_reg[ADDR_W-1:0];
      end
    end
  end
endmodule
