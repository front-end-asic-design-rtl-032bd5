// Behavioural model of the MUX-based delay line (not synthesizable as a
// delay: the unit delay is a physical property of the cells).
//
// NTAPS elements in a chain; element i is a 2:1 mux followed by a delay cell
// (in silicon a pair of NAND gates, UNIT_DELAY_NS each element). The mux
// passes clk_in when control[i] is high (entry point) and the previous
// element's output otherwise; element 0's other input is tied high. taps[i]
// is clk_(i+1) of the document, so with the entry at element e, taps[j]
// carries clk_in delayed by (j - e + 1) unit delays. The structure, the tap
// count and the 620 ps unit delay are the document's. The delays are
// inertial: pulses shorter than one unit delay are swallowed, as a gate
// would.
`timescale 1ns/1ps
module delay_line #(
  parameter int unsigned NTAPS         = 96,
  parameter real         UNIT_DELAY_NS = 0.62
) (
  input  logic             clk_in,
  input  logic [NTAPS-1:0] control,
  output logic [NTAPS-1:0] taps
);
  logic [NTAPS-1:0] m;

  for (genvar i = 0; i < NTAPS; i++) begin : g_elem
    if (i == 0) begin : g_first
      assign m[i] = control[i] ? clk_in : 1'b1;
    end else begin : g_rest
      assign m[i] = control[i] ? clk_in : taps[i-1];
    end
    assign #(UNIT_DELAY_NS) taps[i] = m[i];
  end
endmodule
