// XOR phase detector of the DLL.
//
// up_xor is the XOR of the reference (pixel) clock and the feedback clock
// from the end of the delay line. A flip-flop clocked by the reference's
// rising edge samples it into up. Just before that edge the reference is low,
// so the sampled XOR equals the feedback level; the flop therefore samples
// fbk_clk directly, which is the same value and keeps the sample free of the
// zero-delay race between ref_clk and its own XOR in simulation.
// Result: up is low while the feedback lags by up to 180 degrees, high from
// 180 degrees until the lag reaches a full period, and low again once the
// two clocks are aligned (the document's timing diagram). Synchronous
// active-low reset clears up.
`timescale 1ns/1ps
module phase_detector (
  input  logic ref_clk,
  input  logic fbk_clk,
  input  logic rst_n,
  output logic up_xor,
  output logic up
);
  assign up_xor = ref_clk ^ fbk_clk;

  always_ff @(posedge ref_clk) begin
    if (!rst_n) up <= 1'b0;
    else        up <= fbk_clk;   // = up_xor just before the rising edge
  end
endmodule
