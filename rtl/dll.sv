// Counter-controlled all-digital delay-locked loop.
//
// The phase detector compares the pixel clock (ref_clk) with the last tap of
// the delay line; the controller, clocked by clkrefby2, lengthens the line
// until the feedback lags by exactly one pixel period (within one unit
// delay) and then raises lock. count is then the number N of unit delays in
// one period, and the taps NTAPS-N .. NTAPS-1 carry the pixel clock delayed
// by 1..N units, i.e. 360/N degree steps (about 620 ps at 20 MHz).
// Lockable pixel periods: above INIT_COUNT and at most NTAPS unit delays
// (about 29.8 ns to 59.5 ns with the defaults).
`timescale 1ns/1ps
module dll #(
  parameter int unsigned NTAPS         = 96,
  parameter real         UNIT_DELAY_NS = 0.62,
  parameter int unsigned INIT_COUNT    = 48
) (
  input  logic                       ref_clk,
  input  logic                       clkrefby2,
  input  logic                       rst_n,
  output logic [NTAPS-1:0]           taps,
  output logic [$clog2(NTAPS+1)-1:0] count,
  output logic                       up,
  output logic                       lock
);
  logic [NTAPS-1:0] control;
  logic             up_xor;

  phase_detector u_pd (
    .ref_clk (ref_clk),
    .fbk_clk (taps[NTAPS-1]),
    .rst_n   (rst_n),
    .up_xor  (up_xor),
    .up      (up)
  );

  dll_controller #(.NTAPS(NTAPS), .INIT_COUNT(INIT_COUNT)) u_ctrl (
    .clk     (clkrefby2),
    .rst_n   (rst_n),
    .up      (up),
    .count   (count),
    .control (control),
    .lock    (lock)
  );

  delay_line #(.NTAPS(NTAPS), .UNIT_DELAY_NS(UNIT_DELAY_NS)) u_dl (
    .clk_in  (ref_clk),
    .control (control),
    .taps    (taps)
  );
endmodule
