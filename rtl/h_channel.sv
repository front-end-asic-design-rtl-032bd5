// One high-frequency clock channel: coarse generator, masking, phase
// calculation for both edges, fine pulse generator, then enable and
// polarity. Output: en ? fine ^ pol : pol.
`timescale 1ns/1ps
module h_channel
  import tg_pkg::*;
#(
  parameter int unsigned NTAPS = 96
) (
  input  logic                       pclk,
  input  logic                       rst_n,
  input  logic                       start,
  input  hclk_cfg_t                  c,
  input  logic [NTAPS-1:0]           taps,
  input  logic [$clog2(NTAPS+1)-1:0] n_lock,
  input  logic                       mask,
  input  logic                       tog_state,
  output logic                       clk_out
);
  localparam int unsigned TW = $clog2(NTAPS);
  logic          coarse, fix, masked, fine;
  logic [TW-1:0] tap_r, tap_f;

  hclk_coarse u_coarse (
    .clk(pclk), .rst_n(rst_n), .start(start),
    .rise(c.rise), .fall(c.fall), .period(c.period),
    .coarse(coarse), .fix(fix)
  );

  clk_mask u_mask (
    .clk_in(coarse), .mask(mask), .mask_en(c.mask_en), .tog_en(c.tog_en),
    .tog_state(tog_state), .clk_out(masked)
  );

  tap_calc #(.NTAPS(NTAPS)) u_tr (.clk(pclk), .phase(c.phase_r), .n_lock(n_lock), .tap(tap_r));
  tap_calc #(.NTAPS(NTAPS)) u_tf (.clk(pclk), .phase(c.phase_f), .n_lock(n_lock), .tap(tap_f));

  fine_pulse_gen #(.NTAPS(NTAPS)) u_fine (
    .taps(taps), .rst_n(rst_n), .tap_r(tap_r), .tap_f(tap_f),
    .r_after_f(c.phase_r >= c.phase_f), .fix(fix), .coarse(masked), .fine(fine)
  );

  assign clk_out = c.en ? (fine ^ c.pol) : c.pol;
endmodule
