// Testbench for cfg_decode: random configuration words; every decoded
// field is compared with bits extracted here from the register map.
`timescale 1ns/1ps
module cfg_decode_tb;
  import tg_pkg::*;
  cfg_words_t  cfg;
  vpat_words_t vpat;
  logic [4:0]  divisor;
  sync_cfg_t   sync_c;
  exp_cfg_t    exp_c;
  mask_cfg_t   hmask_c, vmask_c, clpob_c, pblk_c;
  mtog_cfg_t   mtog_c;
  hclk_cfg_t   h_c [H_MAX];
  vclk_cfg_t   v_c [V_MAX];
  int checks = 0, failures = 0;

  cfg_decode dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    for (int it = 0; it < 20; it++) begin
      for (int a = 0; a < CFG_WORDS; a++) cfg[a] = 16'($urandom);
      for (int a = 0; a < VPAT_WORDS; a++) vpat[a] = (it == 0 && a % 3 == 2) ? 16'd0 : 16'($urandom);
      #1;
      chk(divisor == cfg[0][4:0], "divisor");
      chk(sync_c.hd_len == cfg[1] && sync_c.vd_len == cfg[2] && sync_c.hd_rise == cfg[3]
          && sync_c.vd_rise == cfg[4], "sync sizes");
      chk({sync_c.vd_pol, sync_c.vd_en, sync_c.hd_pol, sync_c.hd_en} == cfg[5][3:0], "sync ctrl");
      for (int i = 0; i < 4; i++) chk(exp_c.tog[i] == cfg[6+i], "exp toggle");
      chk(exp_c.en == cfg[10][0] && exp_c.pol == cfg[10][1], "exp ctrl");
      for (int i = 0; i < 6; i++) begin
        chk(hmask_c.tog[i] == cfg[11+i], "hmask tog");
        chk(vmask_c.tog[i] == cfg[20+i], "vmask tog");
        chk(clpob_c.tog[i] == cfg[27+i], "clpob tog");
        chk(pblk_c.tog[i] == cfg[34+i], "pblk tog");
      end
      chk(hmask_c.en == cfg[17][0] && clpob_c.pol == cfg[33][1] && pblk_c.en == cfg[40][0]
          && vmask_c.en == cfg[26][0], "mask ctrl");
      chk(mtog_c.pos == cfg[18] && mtog_c.en == cfg[19][0], "mask toggle");
      for (int h = 0; h < H_MAX; h++) begin
        automatic int b = 64 + 3*h;
        chk(h_c[h].rise == cfg[b][4:0] && h_c[h].fall == cfg[b][9:5] && h_c[h].period == cfg[b][14:10],
            $sformatf("h%0d edges", h));
        chk(h_c[h].phase_r == cfg[b+1][8:0] && h_c[h].phase_f == cfg[b+2][8:0], "h phases");
        chk(h_c[h].en == cfg[b+2][9] && h_c[h].pol == cfg[b+2][10] && h_c[h].mask_en == cfg[b+2][11]
            && h_c[h].tog_en == cfg[b+2][12], "h ctrl");
      end
      for (int v = 0; v < V_MAX; v++) begin
        automatic int b = 128 + 5*v;
        chk(v_c[v].rise == cfg[b] && v_c[v].fall == cfg[b+1], "v edges");
        chk(v_c[v].phase_r == cfg[b+2][8:0] && v_c[v].phase_f == cfg[b+3][8:0], "v phases");
        chk(v_c[v].en == cfg[b+3][9] && v_c[v].pol == cfg[b+3][10] && v_c[v].mask_en == cfg[b+3][11], "v ctrl");
        chk(v_c[v].pstart == vpat[3*v] && v_c[v].plen == vpat[3*v+1], "v pattern");
        chk(v_c[v].prep == (vpat[3*v+2] == 0 ? 16'd1 : vpat[3*v+2]), "v repeat");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
