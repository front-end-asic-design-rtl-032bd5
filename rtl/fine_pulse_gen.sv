// Fine clock pulse generator.
//
// Moves the edges of a coarse (pixel-aligned) pulse by fractions of a pixel
// period. Two taps of the locked DLL are selected: clk_r for the rising
// edge and clk_f for the falling edge. The coarse pulse is latched by each
// of them (clock_r, clock_f), so clock_r is the coarse pulse shifted by the
// rise phase and clock_f by the fall phase.
//  * Wide pulses (fix = 0, coarse pulse longer than one pixel, or one pixel
//    with rise phase >= fall phase): the output must rise with clock_r and
//    fall with clock_f. If the rise phase is the later one this is
//    clock_r AND clock_f, otherwise clock_r OR clock_f.
//  * Short pulses (fix = 1 with rise phase < fall phase, coarse rise edge
//    equal to coarse fall edge): the coarse pulse marks one pixel, and the
//    output is high from the rise phase to the fall phase inside that pixel.
//    Each tap clock toggles a flop when it samples the coarse pulse high;
//    the XOR of the two flops rises at clk_r and falls at clk_f. A coarse
//    pulse held high for several pixels gives one short pulse per pixel,
//    i.e. a pixel-rate clock with programmable duty cycle.
// The latching with the two DLL clocks, the AND/OR combination and the fix
// signal follow the document; the toggle-flop form of the short-pulse case
// is this design's way of producing it. Output edges follow the coarse edges
// by the programmed phase within the same pixel period (tap NTAPS-1, used
// for phase 0, lags the pixel edge by less than one unit delay).
`timescale 1ns/1ps
module fine_pulse_gen #(
  parameter int unsigned NTAPS = 96
) (
  input  logic [NTAPS-1:0]         taps,
  input  logic                     rst_n,
  input  logic [$clog2(NTAPS)-1:0] tap_r,
  input  logic [$clog2(NTAPS)-1:0] tap_f,
  input  logic                     r_after_f,  // rise phase >= fall phase
  input  logic                     fix,
  input  logic                     coarse,
  output logic                     fine
);
  logic clk_r, clk_f;
  logic clock_r, clock_f;
  logic t_r, t_f;

  assign clk_r = taps[tap_r];
  assign clk_f = taps[tap_f];

  always_ff @(posedge clk_r or negedge rst_n) begin
    if (!rst_n) begin
      clock_r <= 1'b0;
      t_r     <= 1'b0;
    end else begin
      clock_r <= coarse;
      t_r     <= t_r ^ coarse;
    end
  end

  always_ff @(posedge clk_f or negedge rst_n) begin
    if (!rst_n) begin
      clock_f <= 1'b0;
      t_f     <= 1'b0;
    end else begin
      clock_f <= coarse;
      t_f     <= t_f ^ coarse;
    end
  end

  always_comb begin
    if (fix && !r_after_f) fine = t_r ^ t_f;
    else if (r_after_f)    fine = clock_r & clock_f;
    else                   fine = clock_r | clock_f;
  end
endmodule
