// Exposure (substrate / electronic shutter) clock generator.
//
// A counter-based FSM counts the line on the pixel clock (line_len pixels,
// 0 = 65536). Up to four toggle positions form two pulses [tog1, tog2) and
// [tog3, tog4); a pair whose second toggle is not above its first is unused,
// so two-toggle operation leaves tog3 = tog4 = 0. The output is the pulse
// XOR pol, and pol when disabled. Registered, same latency as the other
// pixel-clock generators. The four toggles, the line counter, polarity and
// enable are the document's; the pairing of toggles is this design's.
`timescale 1ns/1ps
module exposure_gen #(
  parameter int unsigned NTOG = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [15:0]           line_len,
  input  logic [NTOG-1:0][15:0] tog,
  input  logic                  en,
  input  logic                  pol,
  output logic                  sub_clk
);
  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t      state;
  logic [15:0] pix;
  logic        act, act_nx;

  always_comb begin
    act_nx = 1'b0;
    for (int i = 0; i < NTOG / 2; i++)
      if (tog[2*i] < tog[2*i+1] && pix >= tog[2*i] && pix < tog[2*i+1]) act_nx = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pix   <= '0;
      act   <= 1'b0;
    end else if (state == S_IDLE || !start) begin
      pix   <= '0;
      act   <= 1'b0;
      state <= start ? S_RUN : S_IDLE;
    end else begin
      act <= act_nx && en;
      pix <= (pix == line_len - 1'b1) ? '0 : pix + 1'b1;
    end
  end

  assign sub_clk = act ^ pol;
endmodule
