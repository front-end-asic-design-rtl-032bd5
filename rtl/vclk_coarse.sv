// Vertical (low-frequency) coarse clock generator with pattern sequencing.
//
// A 16-bit pixel counter runs over the line (line_len pixels, 0 = 65536).
// At pixel pstart of each line the pattern sequence begins: a pattern
// counter runs over plen pixels (0 = the whole line) and the pattern is
// played prep times (a repeat counter), then the clock rests until the next
// line. Inside each pattern the coarse pulse is high while the pattern count
// is in [rise, fall) (rise == fall: a one-pixel pulse with fix raised for the
// fine generator). A sequence still running at the end of the line is cut
// there. FSM: IDLE (before the delayed start) -> WAIT (before pstart) -> RUN
// -> DONE (rest of line). Start, length and repeat come from the pattern
// group entry selected for this clock. Timing: coarse is registered, one
// pixel after the counters, the same latency as the horizontal generator.
// The counters (line, start position, repeats) and the default of one
// repeat of line length are the document's; cutting at line end is this
// design's choice.
`timescale 1ns/1ps
module vclk_coarse #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] line_len,
  input  logic [W-1:0] rise,
  input  logic [W-1:0] fall,
  input  logic [W-1:0] pstart,
  input  logic [W-1:0] plen,
  input  logic [W-1:0] prep,
  output logic         coarse,
  output logic         fix
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RUN, S_DONE} state_t;
  state_t       state, state_nx;
  logic [W-1:0] pix, pix_nx;
  logic [W-1:0] pc, pc_nx;      // pattern pixel
  logic [W-1:0] rc, rc_nx;      // completed patterns
  logic [W-1:0] plen_m1, prep_m1;

  assign plen_m1 = ((plen == '0) ? line_len : plen) - 1'b1;
  assign prep_m1 = (prep == '0) ? '0 : prep - 1'b1;

  // next pixel's state
  always_comb begin
    pix_nx   = (pix == line_len - 1'b1) ? '0 : pix + 1'b1;
    state_nx = state;
    pc_nx    = pc;
    rc_nx    = rc;
    if (state == S_RUN) begin
      if (pc == plen_m1) begin
        pc_nx = '0;
        if (rc == prep_m1) state_nx = S_DONE;
        else               rc_nx = rc + 1'b1;
      end else begin
        pc_nx = pc + 1'b1;
      end
    end
    if (pix_nx == '0) state_nx = S_WAIT;           // new line
    if (pix_nx == pstart && state_nx == S_WAIT) begin
      state_nx = S_RUN;
      pc_nx    = '0;
      rc_nx    = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      pix    <= '0;
      pc     <= '0;
      rc     <= '0;
      coarse <= 1'b0;
    end else if (!start) begin
      state  <= S_IDLE;
      pix    <= '0;
      pc     <= '0;
      rc     <= '0;
      coarse <= 1'b0;
    end else if (state == S_IDLE) begin
      // pixel 0 of the first line
      state  <= (pstart == '0) ? S_RUN : S_WAIT;
      pix    <= '0;
      pc     <= '0;
      rc     <= '0;
      coarse <= 1'b0;
    end else begin
      coarse <= (state == S_RUN) && tg_pkg::in_window(16'(pc), 16'(rise), 16'(fall));
      state  <= state_nx;
      pix    <= pix_nx;
      pc     <= pc_nx;
      rc     <= rc_nx;
    end
  end

  assign fix = (rise == fall);
endmodule
