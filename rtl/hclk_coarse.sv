// Horizontal (high-frequency) coarse clock generator.
//
// A 5-bit counter runs from 0 to `period` and wraps, so the clock repeats
// every period+1 pixel clocks. The coarse pulse is high while the count is
// in [rise, fall) (wrapping if rise > fall); rise == fall marks the single
// count `rise` and raises fix, which asks the fine generator for a pulse
// shorter than one pixel. Edges therefore sit on a 32-position grid of pixel
// periods (50 ns at 20 MHz). A small FSM holds the counter in IDLE until the
// delayed start (DLL locked, taps computed) and then runs.
// Timing: coarse is registered; the pixel with count c is shown during the
// following pixel clock. Polarity and enable are applied after the fine
// generator (h_channel). Counter width, edge range and period range follow
// the document; the wrap rule and fix encoding are this design's.
`timescale 1ns/1ps
module hclk_coarse #(
  parameter int unsigned CW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] rise,
  input  logic [CW-1:0] fall,
  input  logic [CW-1:0] period,
  output logic          coarse,
  output logic          fix
);
  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      coarse <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          cnt    <= '0;
          coarse <= 1'b0;
          if (start) state <= S_RUN;
        end
        default: begin
          coarse <= tg_pkg::in_window(16'(cnt), 16'(rise), 16'(fall));
          cnt    <= (cnt >= period) ? '0 : cnt + 1'b1;
          if (!start) state <= S_IDLE;
        end
      endcase
    end
  end

  assign fix = (rise == fall);
endmodule
