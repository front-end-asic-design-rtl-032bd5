// Masking toggle generation.
//
// Counts the line on the pixel clock (hd_len pixels, 0 = 65536) and raises
// toggle_en from the programmed masking toggle position to the end of the
// line, when enabled. A clock with masking toggle enabled changes its held
// level inside masking regions from that position on (clk_mask). One toggle
// position per line, as in the document. Timing: registered, aligned with
// mask_gen and the coarse generators.
`timescale 1ns/1ps
module mask_toggle (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] hd_len,
  input  logic [15:0] tog_pos,
  input  logic        en,
  output logic        toggle_en
);
  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t      state;
  logic [15:0] pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pix       <= '0;
      toggle_en <= 1'b0;
    end else if (state == S_IDLE || !start) begin
      pix       <= '0;
      toggle_en <= 1'b0;
      state     <= start ? S_RUN : S_IDLE;
    end else begin
      toggle_en <= en && (pix >= tog_pos);
      pix       <= (pix == hd_len - 1'b1) ? '0 : pix + 1'b1;
    end
  end
endmodule
