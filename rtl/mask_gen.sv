// Masking signal generation (horizontal/vertical masking, CLPOB, PBLK).
//
// A counter-based FSM on the pixel clock counts the line (line_len pixels,
// 0 = 65536). Up to six toggle positions form three regions
// [tog1, tog2), [tog3, tog4), [tog5, tog6); a pair whose second toggle is
// not above its first is unused (two- and four-toggle modes leave the last
// toggles at 0). `active` is high inside a region when enabled; `out` is
// active XOR pol, and pol when disabled. Timing: both registered, one pixel
// after the counter, like the coarse clock generators. The six toggles,
// enable and polarity are the document's; region pairing and encoding of
// unused toggles are this design's.
`timescale 1ns/1ps
module mask_gen #(
  parameter int unsigned NTOG = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [15:0]          line_len,
  input  logic [NTOG-1:0][15:0] tog,
  input  logic                 en,
  input  logic                 pol,
  output logic                 active,
  output logic                 out
);
  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t      state;
  logic [15:0] pix;
  logic        act_nx;

  always_comb begin
    act_nx = 1'b0;
    for (int i = 0; i < NTOG / 2; i++)
      if (tog[2*i] < tog[2*i+1] && pix >= tog[2*i] && pix < tog[2*i+1]) act_nx = 1'b1;
    act_nx = act_nx && en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      pix    <= '0;
      active <= 1'b0;
    end else if (state == S_IDLE || !start) begin
      pix    <= '0;
      active <= 1'b0;
      state  <= start ? S_RUN : S_IDLE;
    end else begin
      active <= act_nx;
      pix    <= (pix == line_len - 1'b1) ? '0 : pix + 1'b1;
    end
  end

  assign out = active ^ pol;
endmodule
