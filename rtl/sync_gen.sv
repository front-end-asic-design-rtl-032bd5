// Line and frame synchronizing pulse generator (HD, VD).
//
// A pixel counter runs over the line size (hd_len, 0 = 65536) and a line
// counter over the frame size (vd_len lines, 0 = 65536). HD is active from
// pixel 0 up to, not including, pixel hd_rise of every line; VD is active
// from line 0 up to line vd_rise of every frame. Both are active low when
// their polarity bit is 0 (the document's default, falling at pixel 0);
// polarity 1 makes them active high; disabled they rest at the inactive
// level. pix and line give the position of the pixel shown. Registered,
// same latency as the other pixel-clock generators. Sizes up to 64K x 64K
// follow the document; expressing the pulse width as a rising-edge position
// is this design's reading of "rising edge" in the image-area registers.
`timescale 1ns/1ps
module sync_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] hd_len,
  input  logic [15:0] vd_len,
  input  logic [15:0] hd_rise,
  input  logic [15:0] vd_rise,
  input  logic        hd_en,
  input  logic        hd_pol,
  input  logic        vd_en,
  input  logic        vd_pol,
  output logic        hd,
  output logic        vd,
  output logic        line_start,
  output logic        frame_start
);
  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t      state;
  logic [15:0] pix, line;
  logic        hd_act, vd_act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pix         <= '0;
      line        <= '0;
      hd_act      <= 1'b0;
      vd_act      <= 1'b0;
      line_start  <= 1'b0;
      frame_start <= 1'b0;
    end else if (state == S_IDLE || !start) begin
      pix         <= '0;
      line        <= '0;
      hd_act      <= 1'b0;
      vd_act      <= 1'b0;
      line_start  <= 1'b0;
      frame_start <= 1'b0;
      state       <= start ? S_RUN : S_IDLE;
    end else begin
      hd_act      <= hd_en && (pix < hd_rise);
      vd_act      <= vd_en && (line < vd_rise);
      line_start  <= (pix == '0);
      frame_start <= (pix == '0) && (line == '0);
      if (pix == hd_len - 1'b1) begin
        pix  <= '0;
        line <= (line == vd_len - 1'b1) ? '0 : line + 1'b1;
      end else begin
        pix <= pix + 1'b1;
      end
    end
  end

  assign hd = ~(hd_act ^ hd_pol);
  assign vd = ~(vd_act ^ vd_pol);
endmodule
