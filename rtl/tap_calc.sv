// Phase calculation: converts a phase in degrees into a delay-line tap.
//
// With the DLL locked to N unit delays per pixel period, a phase of PS
// degrees needs D = floor(PS * N / 360) unit delays, taken from tap
// NTAPS-1-N+D (taps below NTAPS-N are outside the loop). D = 0 is served by
// the last tap, which lags a full period and therefore has the same phase.
// Three pipeline stages: the multiplier PS*N; the division by 360, done as a
// multiplication by the constant ceil(2^24/360) and a 24-bit shift (exact for
// every PS < 360 and N <= 96); the subtraction and offset. Phases of 360 or
// more are clamped to a full period. The multiplier-and-subtraction
// structure and the pipeline follow the document; the reciprocal constant is
// this design's. Latency: 3 clock cycles.
`timescale 1ns/1ps
module tap_calc #(
  parameter int unsigned NTAPS = 96
) (
  input  logic                       clk,
  input  logic [8:0]                 phase,
  input  logic [$clog2(NTAPS+1)-1:0] n_lock,
  output logic [$clog2(NTAPS)-1:0]   tap
);
  localparam int unsigned NW    = $clog2(NTAPS + 1);
  localparam int unsigned TW    = $clog2(NTAPS);
  localparam int unsigned RECIP = 46604;   // ceil(2^24 / 360)

  logic [15:0]   prod;
  logic [NW-1:0] n_s1, n_s2;
  logic [NW-1:0] d_s2;
  logic [32:0]   scaled;

  assign scaled = 33'(prod) * 33'(RECIP);

  always_ff @(posedge clk) begin
    // stage 1: multiplier
    prod <= 16'(phase) * 16'(n_lock);
    n_s1 <= n_lock;
    // stage 2: division by 360
    d_s2 <= (scaled[32:24] >= 9'(n_s1)) ? n_s1 : NW'(scaled[32:24]);
    n_s2 <= n_s1;
    // stage 3: subtraction to a tap index
    tap  <= TW'(NTAPS - 1) - TW'(n_s2) + ((d_s2 == '0) ? TW'(n_s2) : TW'(d_s2));
  end
endmodule
