// Control logic: decodes the configuration data-out registers into the
// settings of each block, following the register map of tg_pkg.
// Purely combinational. A repeat count of 0 is read as 1 here; a pattern
// length of 0 (whole line) is resolved in vclk_coarse. This matches
// the document's default of
// one repeat whose length is the line length.
`timescale 1ns/1ps
module cfg_decode
  import tg_pkg::*;
#(
  parameter int unsigned NUM_H = H_MAX,
  parameter int unsigned NUM_V = V_MAX
) (
  input  cfg_words_t  cfg,
  input  vpat_words_t vpat,
  output logic [4:0]  divisor,
  output sync_cfg_t   sync_c,
  output exp_cfg_t    exp_c,
  output mask_cfg_t   hmask_c,
  output mask_cfg_t   vmask_c,
  output mask_cfg_t   clpob_c,
  output mask_cfg_t   pblk_c,
  output mtog_cfg_t   mtog_c,
  output hclk_cfg_t   h_c [NUM_H],
  output vclk_cfg_t   v_c [NUM_V]
);
  function automatic mask_cfg_t dec_mask(input int unsigned base, input int unsigned ctrl,
                                         input cfg_words_t c);
    mask_cfg_t m;
    for (int i = 0; i < 6; i++) m.tog[i] = c[base + i];
    m.en  = c[ctrl][0];
    m.pol = c[ctrl][1];
    return m;
  endfunction

  always_comb begin
    divisor = cfg[A_DIVISOR][4:0];

    sync_c.hd_len  = cfg[A_HD_LEN];
    sync_c.vd_len  = cfg[A_VD_LEN];
    sync_c.hd_rise = cfg[A_HD_RISE];
    sync_c.vd_rise = cfg[A_VD_RISE];
    sync_c.hd_en   = cfg[A_SYNC_CTRL][0];
    sync_c.hd_pol  = cfg[A_SYNC_CTRL][1];
    sync_c.vd_en   = cfg[A_SYNC_CTRL][2];
    sync_c.vd_pol  = cfg[A_SYNC_CTRL][3];

    for (int i = 0; i < 4; i++) exp_c.tog[i] = cfg[A_EXP_TOG + i];
    exp_c.en  = cfg[A_EXP_CTRL][0];
    exp_c.pol = cfg[A_EXP_CTRL][1];

    hmask_c = dec_mask(A_HMASK_TOG, A_HMASK_CTRL, cfg);
    vmask_c = dec_mask(A_VMASK_TOG, A_VMASK_CTRL, cfg);
    clpob_c = dec_mask(A_CLPOB_TOG, A_CLPOB_CTRL, cfg);
    pblk_c  = dec_mask(A_PBLK_TOG,  A_PBLK_CTRL,  cfg);

    mtog_c.pos = cfg[A_MTOG_POS];
    mtog_c.en  = cfg[A_MTOG_CTRL][0];

    for (int h = 0; h < NUM_H; h++) begin
      h_c[h].rise    = cfg[H_BASE + H_WORDS*h][4:0];
      h_c[h].fall    = cfg[H_BASE + H_WORDS*h][9:5];
      h_c[h].period  = cfg[H_BASE + H_WORDS*h][14:10];
      h_c[h].phase_r = cfg[H_BASE + H_WORDS*h + 1][PH_W-1:0];
      h_c[h].phase_f = cfg[H_BASE + H_WORDS*h + 2][PH_W-1:0];
      h_c[h].en      = cfg[H_BASE + H_WORDS*h + 2][9];
      h_c[h].pol     = cfg[H_BASE + H_WORDS*h + 2][10];
      h_c[h].mask_en = cfg[H_BASE + H_WORDS*h + 2][11];
      h_c[h].tog_en  = cfg[H_BASE + H_WORDS*h + 2][12];
    end

    for (int v = 0; v < NUM_V; v++) begin
      v_c[v].rise    = cfg[V_BASE + V_WORDS*v];
      v_c[v].fall    = cfg[V_BASE + V_WORDS*v + 1];
      v_c[v].phase_r = cfg[V_BASE + V_WORDS*v + 2][PH_W-1:0];
      v_c[v].phase_f = cfg[V_BASE + V_WORDS*v + 3][PH_W-1:0];
      v_c[v].en      = cfg[V_BASE + V_WORDS*v + 3][9];
      v_c[v].pol     = cfg[V_BASE + V_WORDS*v + 3][10];
      v_c[v].mask_en = cfg[V_BASE + V_WORDS*v + 3][11];
      v_c[v].pstart  = vpat[3*v];
      v_c[v].plen    = vpat[3*v + 1];
      v_c[v].prep    = (vpat[3*v + 2] == 16'd0) ? 16'd1 : vpat[3*v + 2];
    end
  end
endmodule
