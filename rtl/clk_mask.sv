// Clock masking.
//
// Inside a masking region (mask high and masking enabled for this clock)
// the coarse clock is replaced by a held level: low, or high once the
// masking toggle position of the line has been passed (tog_state) when the
// clock has masking toggle enabled. Outside the region the clock passes.
// Polarity is applied later, so "low" is the clock's inactive level.
// Combinational; mask and tog_state come from pixel-clock registers with
// the same latency as the coarse generators.
`timescale 1ns/1ps
module clk_mask (
  input  logic clk_in,
  input  logic mask,
  input  logic mask_en,
  input  logic tog_en,
  input  logic tog_state,
  output logic clk_out
);
  always_comb begin
    if (mask && mask_en) clk_out = tog_en && tog_state;
    else                 clk_out = clk_in;
  end
endmodule
