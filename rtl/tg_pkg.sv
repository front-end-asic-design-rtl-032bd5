// Shared constants, register map and configuration types of the CCD timing
// generator.
//
// The configuration memory is 1K x 16 bits. Words are written over the SPI
// and copied by the initialization sequencer into data-out registers that
// hold the first CFG_WORDS addresses, plus three resolved pattern words
// (start, length, repeat) for each vertical clock. The register map below is
// this design's own layout; the document lists what is stored (edges, period,
// polarity, enable, masking, toggles, pattern groups, line and frame size)
// but not where.
//
// Polarity convention: for the clocks, the exposure clock and the masking
// pulses, pol=1 inverts the output and enable=0 holds the output at the
// inactive level (pol). HD and VD are active low when pol=0, as in the
// document's default.
`timescale 1ns/1ps
package tg_pkg;

  localparam int unsigned DATA_W   = 16;
  localparam int unsigned ADDR_W   = 10;
  localparam int unsigned MEM_DEPTH = 1024;
  localparam int unsigned H_MAX    = 20;   // high-frequency clocks
  localparam int unsigned V_MAX    = 30;   // low-frequency clocks
  localparam int unsigned DLL_TAPS = 96;   // DLL delay-line taps
  localparam int unsigned TAP_W    = 7;
  localparam int unsigned PH_W     = 9;    // phase in degrees, 0..359
  localparam int unsigned N_GROUPS = 4;    // pattern groups A..D
  localparam int unsigned N_PAT    = 32;   // patterns per group

  // ---------------- register map (word addresses) ----------------
  localparam int unsigned A_DIVISOR    = 0;   // [4:0] clock divisor
  localparam int unsigned A_HD_LEN     = 1;   // pixels per line (0 = 65536)
  localparam int unsigned A_VD_LEN     = 2;   // lines per frame (0 = 65536)
  localparam int unsigned A_HD_RISE    = 3;   // pixel where HD returns inactive
  localparam int unsigned A_VD_RISE    = 4;   // line where VD returns inactive
  localparam int unsigned A_SYNC_CTRL  = 5;   // [0] hd_en [1] hd_pol [2] vd_en [3] vd_pol
  localparam int unsigned A_EXP_TOG    = 6;   // 6..9  exposure toggles 1..4
  localparam int unsigned A_EXP_CTRL   = 10;  // [0] en [1] pol
  localparam int unsigned A_HMASK_TOG  = 11;  // 11..16 horizontal masking toggles 1..6
  localparam int unsigned A_HMASK_CTRL = 17;  // [0] en [1] pol
  localparam int unsigned A_MTOG_POS   = 18;  // masking toggle position
  localparam int unsigned A_MTOG_CTRL  = 19;  // [0] enable
  localparam int unsigned A_VMASK_TOG  = 20;  // 20..25 vertical masking toggles
  localparam int unsigned A_VMASK_CTRL = 26;
  localparam int unsigned A_CLPOB_TOG  = 27;  // 27..32 CLPOB toggles
  localparam int unsigned A_CLPOB_CTRL = 33;
  localparam int unsigned A_PBLK_TOG   = 34;  // 34..39 PBLK toggles
  localparam int unsigned A_PBLK_CTRL  = 40;
  // Horizontal clock h, 3 words at H_BASE + 3h:
  //   w0 = {1'b0, period[4:0], fall[4:0], rise[4:0]}
  //   w1 = {7'b0, phase_r[8:0]}
  //   w2 = {3'b0, tog_en, mask_en, pol, en, phase_f[8:0]}
  localparam int unsigned H_BASE = 64;
  localparam int unsigned H_WORDS = 3;
  // Vertical clock v, 5 words at V_BASE + 5v:
  //   w0 = rise[15:0], w1 = fall[15:0], w2 = {7'b0, phase_r[8:0]}
  //   w3 = {2'b0, grp[1:0], mask_en, pol, en, phase_f[8:0]}
  //   w4 = {1'b0, rep_idx[4:0], len_idx[4:0], start_idx[4:0]}
  localparam int unsigned V_BASE = 128;
  localparam int unsigned V_WORDS = 5;
  // Pattern tables, entry (group g, index i) at BASE + 32g + i.
  localparam int unsigned PAT_START_BASE = 512;
  localparam int unsigned PAT_LEN_BASE   = 640;
  localparam int unsigned PAT_REP_BASE   = 768;
  // Writing this address starts the initialization sequencer.
  localparam int unsigned START_ADDR = 1023;

  localparam int unsigned CFG_WORDS  = V_BASE + V_WORDS * V_MAX;  // 278
  localparam int unsigned VPAT_WORDS = 3 * V_MAX;                 // start, len, rep per clock

  typedef logic [DATA_W-1:0] word_t;
  typedef word_t [CFG_WORDS-1:0]  cfg_words_t;
  typedef word_t [VPAT_WORDS-1:0] vpat_words_t;

  typedef struct packed {
    logic [4:0]      rise;
    logic [4:0]      fall;
    logic [4:0]      period;
    logic [PH_W-1:0] phase_r;
    logic [PH_W-1:0] phase_f;
    logic            en;
    logic            pol;
    logic            mask_en;
    logic            tog_en;
  } hclk_cfg_t;

  typedef struct packed {
    logic [15:0]     rise;
    logic [15:0]     fall;
    logic [PH_W-1:0] phase_r;
    logic [PH_W-1:0] phase_f;
    logic            en;
    logic            pol;
    logic            mask_en;
    logic [15:0]     pstart;
    logic [15:0]     plen;
    logic [15:0]     prep;
  } vclk_cfg_t;

  typedef struct packed {
    logic [15:0] hd_len;
    logic [15:0] vd_len;
    logic [15:0] hd_rise;
    logic [15:0] vd_rise;
    logic        hd_en;
    logic        hd_pol;
    logic        vd_en;
    logic        vd_pol;
  } sync_cfg_t;

  typedef struct packed {
    logic [3:0][15:0] tog;
    logic             en;
    logic             pol;
  } exp_cfg_t;

  typedef struct packed {
    logic [5:0][15:0] tog;
    logic             en;
    logic             pol;
  } mask_cfg_t;

  typedef struct packed {
    logic [15:0] pos;
    logic        en;
  } mtog_cfg_t;

  // Coarse pulse window: rise <= c < fall; rise == fall gives a single
  // position (one-pixel pulse, short-pulse mode); rise > fall wraps.
  function automatic logic in_window(input logic [15:0] c, input logic [15:0] rise,
                                     input logic [15:0] fall);
    if (rise < fall)       return (c >= rise) && (c < fall);
    else if (rise == fall) return c == rise;
    else                   return (c >= rise) || (c < fall);
  endfunction

endpackage
