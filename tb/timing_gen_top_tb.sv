// End-to-end testbench for timing_gen_top at its default size (20
// high-frequency and 30 low-frequency channels, 96-tap DLL, 0.62 ns unit
// delay, 1K x 16 configuration memory).
//
// Flow:
//  1. Power-on reset; the configuration RAM is cleared.
//  2. Configuration is written over SPI (one address word, then one data
//     word per register; s_clk 50 ns). The last write goes to the start
//     location, which loads the data-out registers.
//  3. With a 12.5 ns input clock and divisor 4 the pixel clock is 50 ns;
//     the DLL locks and all generators start. For two frames (3 lines of
//     200 pixels) every output is sampled every 2 ns inside each pixel and
//     compared with an ideal waveform computed here from the configuration:
//     coarse windows on the pixel grid, masking, and fine edges at
//     D * 0.62 ns after the pixel edge, with N = ceil(T / 0.62) and
//     D = floor(phase * N / 360) (D = 0 means one full period, N * 0.62 - T
//     after the edge). Samples within 0.8 ns of an expected edge are skipped.
//  4. The divisor is rewritten to 3 (odd division, 37.5 ns pixel) and the
//     start location written again: the design reloads, relocks at the new
//     period and one more frame is checked.
// Channels used: H0 wide pulse, rise phase before fall phase (OR);
// H1 one-pixel pulse inside the pixel (fix mode); H2 fix mode held high =
// pixel-rate clock, masked with the masking toggle; H3 wide pulse, rise
// phase after fall phase (AND), inverted polarity; H4 masked without toggle;
// H5 disabled with polarity 1; V0 pattern (rise 16, fall 34, length 40,
// repeated 4 times, starting at pixel 10); V1 whole-line pattern, vertically
// masked; V2 one-pixel pulse. All other channels are disabled (output 0).
// Each mechanism is counted from the design's own signals and a failure is
// counted for any that never happened.
`timescale 1ns/1ps
module timing_gen_top_tb;
  import tg_pkg::*;

  localparam real TCLK   = 12.5;
  localparam real TSCLK  = 50.0;
  localparam real UNIT   = 0.62;
  localparam int  LINE   = 200;
  localparam int  FRAME  = 3;
  localparam int  HD_R   = 10;
  localparam int  VD_R   = 1;

  logic clk_in = 0, por_n = 0, load = 1, s_clk = 0, s_data = 0;
  logic [H_MAX-1:0] h_clk;
  logic [V_MAX-1:0] v_clk;
  logic hd, vd, sub_clk, clpob, pblk, hblk, vblk, pixel_clk, dll_lock, cfg_done;

  timing_gen_top dut (.*);

  always #(TCLK / 2) clk_in = ~clk_in;
  always #(TSCLK / 2) s_clk = ~s_clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  function automatic bit ck(input bit ok);
    checks++;
    if (!ok) failures++;
    return ok;
  endfunction

  initial begin
    repeat (1600000) @(posedge clk_in);   // 20 ms
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  // ---------------- test configuration ----------------
  typedef struct {
    int rise, fall, period, pr, pf;
    bit en, pol, men, ten;
  } hcfg_t;
  typedef struct {
    int rise, fall, pr, pf, grp, sidx, lidx, ridx;
    bit en, pol, men;
  } vcfg_t;

  localparam int NH = 6, NV = 3;
  hcfg_t hc [NH];
  vcfg_t vc [NV];
  int exp_tog [4] = '{20, 40, 60, 70};
  int hm_tog  [6] = '{120, 140, 0, 0, 0, 0};
  int vm_tog  [6] = '{100, 110, 0, 0, 0, 0};
  int cp_tog  [6] = '{5, 15, 0, 0, 0, 0};
  int pb_tog  [6] = '{150, 160, 170, 175, 0, 0};
  int mtog_pos = 130;
  // pattern table entries used by V0 (group 1, start index 2, length index
  // 3, repeat index 4); V1 and V2 use group 0, index 0 (all zero after the
  // clear: start 0, whole line, once)
  int pat_start = 10, pat_len = 40, pat_rep = 4;

  initial begin
    hc[0] = '{rise: 0, fall: 10, period: 19, pr: 90,  pf: 180, en: 1, pol: 0, men: 0, ten: 0};
    hc[1] = '{rise: 3, fall: 3,  period: 3,  pr: 90,  pf: 270, en: 1, pol: 0, men: 0, ten: 0};
    hc[2] = '{rise: 0, fall: 0,  period: 0,  pr: 45,  pf: 225, en: 1, pol: 0, men: 1, ten: 1};
    hc[3] = '{rise: 2, fall: 6,  period: 9,  pr: 270, pf: 45,  en: 1, pol: 1, men: 0, ten: 0};
    hc[4] = '{rise: 0, fall: 1,  period: 1,  pr: 0,   pf: 120, en: 1, pol: 0, men: 1, ten: 0};
    hc[5] = '{rise: 0, fall: 4,  period: 7,  pr: 0,   pf: 0,   en: 0, pol: 1, men: 0, ten: 0};
    vc[0] = '{rise: 16, fall: 34, pr: 45, pf: 90,  grp: 1, sidx: 2, lidx: 3, ridx: 4, en: 1, pol: 0, men: 0};
    vc[1] = '{rise: 95, fall: 105, pr: 60, pf: 300, grp: 0, sidx: 0, lidx: 0, ridx: 0, en: 1, pol: 0, men: 1};
    vc[2] = '{rise: 50, fall: 50, pr: 90, pf: 270, grp: 0, sidx: 0, lidx: 0, ridx: 0, en: 1, pol: 0, men: 0};
  end

  // ---------------- SPI driver ----------------
  task automatic spi_word(input logic [16:0] w);
    @(negedge s_clk);
    load = 0;
    for (int i = 16; i >= 0; i--) begin
      s_data = w[i];
      @(negedge s_clk);
    end
    load = 1;
    @(negedge s_clk);
  endtask

  task automatic wr(input int addr, input int data);
    spi_word({7'b0, 10'(addr)});
    spi_word({1'b1, 16'(data)});
  endtask

  task automatic configure(input int divisor);
    wr(A_DIVISOR, divisor);
    wr(A_HD_LEN, LINE);
    wr(A_VD_LEN, FRAME);
    wr(A_HD_RISE, HD_R);
    wr(A_VD_RISE, VD_R);
    wr(A_SYNC_CTRL, 4'b0101);               // both enabled, active low
    for (int i = 0; i < 4; i++) wr(A_EXP_TOG + i, exp_tog[i]);
    wr(A_EXP_CTRL, 2'b01);
    for (int i = 0; i < 6; i++) wr(A_HMASK_TOG + i, hm_tog[i]);
    wr(A_HMASK_CTRL, 2'b01);
    wr(A_MTOG_POS, mtog_pos);
    wr(A_MTOG_CTRL, 1);
    for (int i = 0; i < 6; i++) wr(A_VMASK_TOG + i, vm_tog[i]);
    wr(A_VMASK_CTRL, 2'b01);
    for (int i = 0; i < 6; i++) wr(A_CLPOB_TOG + i, cp_tog[i]);
    wr(A_CLPOB_CTRL, 2'b01);
    for (int i = 0; i < 6; i++) wr(A_PBLK_TOG + i, pb_tog[i]);
    wr(A_PBLK_CTRL, 2'b11);                 // enabled, inverted
    for (int h = 0; h < NH; h++) begin
      wr(H_BASE + 3*h,     (hc[h].period << 10) | (hc[h].fall << 5) | hc[h].rise);
      wr(H_BASE + 3*h + 1, hc[h].pr);
      wr(H_BASE + 3*h + 2, (hc[h].ten << 12) | (hc[h].men << 11) | (hc[h].pol << 10)
                           | (hc[h].en << 9) | hc[h].pf);
    end
    for (int v = 0; v < NV; v++) begin
      wr(V_BASE + 5*v,     vc[v].rise);
      wr(V_BASE + 5*v + 1, vc[v].fall);
      wr(V_BASE + 5*v + 2, vc[v].pr);
      wr(V_BASE + 5*v + 3, (vc[v].grp << 12) | (vc[v].men << 11) | (vc[v].pol << 10)
                           | (vc[v].en << 9) | vc[v].pf);
      wr(V_BASE + 5*v + 4, (vc[v].ridx << 10) | (vc[v].lidx << 5) | vc[v].sidx);
    end
    wr(PAT_START_BASE + 32*1 + 2, pat_start);
    wr(PAT_LEN_BASE   + 32*1 + 3, pat_len);
    wr(PAT_REP_BASE   + 32*1 + 4, pat_rep);
    wr(START_ADDR, 0);
  endtask

  // ---------------- reference model ----------------
  function automatic bit win(input int c, input int r, input int f);
    if (r < f)  return c >= r && c < f;
    if (r == f) return c == r;
    return c >= r || c < f;
  endfunction

  function automatic bit regions(input int p, input int t[6]);
    bit a = 0;
    for (int i = 0; i < 3; i++) if (t[2*i] < t[2*i+1] && p >= t[2*i] && p < t[2*i+1]) a = 1;
    return a;
  endfunction

  // masked coarse level of H channel h at absolute pixel k (k < 0: idle)
  function automatic bit h_coarse(input int h, input int k);
    int p = k % LINE;
    bit c;
    if (k < 0) return 0;
    c = win(k % (hc[h].period + 1), hc[h].rise, hc[h].fall);
    if (hc[h].men && regions(p, hm_tog)) c = hc[h].ten && (p >= mtog_pos);
    return c;
  endfunction

  function automatic bit v_coarse(input int v, input int k);
    int p = k % LINE;
    int s, l, r, q;
    bit c;
    if (k < 0) return 0;
    s = (vc[v].grp == 1) ? pat_start : 0;
    l = (vc[v].grp == 1) ? pat_len : 0;
    r = (vc[v].grp == 1) ? pat_rep : 0;
    if (l == 0) l = LINE;
    if (r == 0) r = 1;
    q = p - s;
    c = (q >= 0 && q < l * r) ? win(q % l, vc[v].rise, vc[v].fall) : 0;
    if (vc[v].men && regions(p, vm_tog)) c = 0;
    return c;
  endfunction

  real tper;   // pixel period
  int  nlock;  // expected lock count

  function automatic real dly(input int phase);
    int d = (phase * nlock) / 360;
    return (d == 0) ? nlock * UNIT - tper : d * UNIT;
  endfunction

  // ideal fine output at time t (ns) after pixel edge k
  function automatic bit fine(input bit fixm, input int pr, input int pf,
                              input bit ck, input bit cprev, input real t);
    real dr = dly(pr), df = dly(pf);
    bit  cr = (t >= dr) ? ck : cprev;
    bit  cf = (t >= df) ? ck : cprev;
    if (fixm && pr < pf) return ck && t >= dr && t < df;
    if (pr >= pf)        return cr & cf;
    return cr | cf;
  endfunction

  function automatic bit near(input real t, input real e);
    return (t > e - 0.8) && (t < e + 0.8);
  endfunction

  // ---------------- mechanism counters ----------------
  int n_clear, n_addr_w, n_data_w, n_load, n_lock, n_even, n_odd;
  int n_or, n_and, n_short, n_pixrate, n_mask_low, n_mask_tog, n_vmask;
  int n_pat_rep, n_pat_whole, n_hd, n_vd, n_exp, n_clpob, n_pblk, n_hblk;
  int n_pol, n_disabled, n_reload;

  always @(posedge clk_in) if (dut.clearing) n_clear++;
  always @(posedge clk_in) if (dut.spi_en) begin
    if (dut.spi_we) n_data_w++; else n_addr_w++;
  end
  always @(posedge cfg_done) n_load++;
  always @(posedge dll_lock) n_lock++;
  always @(posedge h_clk[0]) n_or++;
  always @(negedge h_clk[3]) n_and++;     // inverted polarity: pulse is low
  always @(posedge h_clk[1]) n_short++;
  always @(posedge h_clk[2]) n_pixrate++;
  always @(posedge v_clk[0]) n_pat_rep++;
  always @(posedge v_clk[1]) n_pat_whole++;
  always @(negedge hd) n_hd++;
  always @(negedge vd) n_vd++;
  always @(posedge sub_clk) n_exp++;
  always @(posedge clpob) n_clpob++;
  always @(negedge pblk) n_pblk++;
  always @(posedge hblk) n_hblk++;
  always @(posedge pixel_clk) if (dut.start) begin
    if (dut.hmask_act && !dut.tog_state) n_mask_low++;
    if (dut.hmask_act && dut.tog_state)  n_mask_tog++;
    if (dut.vmask_act)                   n_vmask++;
  end

  // ---------------- checks ----------------
  task automatic check_period(input real expect_t);
    real t0, t1, t2;
    repeat (4) @(posedge pixel_clk);   // skip the divider's first cycles
    @(posedge pixel_clk); t0 = $realtime;
    @(negedge pixel_clk); t1 = $realtime;
    @(posedge pixel_clk); t2 = $realtime;
    chk(t2 - t0 == expect_t, $sformatf("pixel period %0.2f, expected %0.2f", t2 - t0, expect_t));
    chk(t1 - t0 == expect_t / 2, $sformatf("pixel high time %0.2f", t1 - t0));
  endtask

  // check every output over npix pixels starting at the first HD of a frame
  task automatic check_frames(input int npix);
    int k = 0;
    real e;
    // pixel 0: the pixel edge at which HD becomes active for the first time
    @(negedge hd);
    e = $realtime;
    chk(vd == 0, "VD active in the first line");
    while (k < npix) begin
      for (real t = 1.0; t < tper - 0.5; t += 2.0) begin
        int p = k % LINE;
        int l = (k / LINE) % FRAME;
        #(e + t - $realtime);
        // sync, exposure, masking outputs (pixel-registered)
        if (!ck(hd == !(p < HD_R)) && failures <= 20) $display("FAIL @%0t: %s", $time, $sformatf("hd pixel %0d", k));
        if (!ck(vd == !(l < VD_R)) && failures <= 20) $display("FAIL @%0t: %s", $time, $sformatf("vd pixel %0d", k));
        if (!ck(sub_clk == ((p >= exp_tog[0] && p < exp_tog[1]) || (p >= exp_tog[2] && p < exp_tog[3]))) && failures <= 20) $display("FAIL @%0t: %s", $time, $sformatf("sub_clk pixel %0d", k));
        if (!ck(hblk == regions(p, hm_tog)) && failures <= 20) $display("FAIL @%0t: %s", $time, $sformatf("hblk pixel %0d", k));
        if (!ck(vblk == regions(p, vm_tog)) && failures <= 20) $display("FAIL @%0t: %s", $time, $sformatf("vblk pixel %0d", k));
        if (!ck(clpob == regions(p, cp_tog)) && failures <= 20) $display("FAIL @%0t: %s", $time, $sformatf("clpob pixel %0d", k));
        if (!ck(pblk == !regions(p, pb_tog)) && failures <= 20) $display("FAIL @%0t: %s", $time, $sformatf("pblk pixel %0d", k));
        // high-frequency channels
        for (int h = 0; h < H_MAX; h++) begin
          bit ex;
          if (h < NH) begin
            if (near(t, dly(hc[h].pr)) || near(t, dly(hc[h].pf)) || near(t, 0.0)) continue;
            ex = hc[h].en ? fine(hc[h].rise == hc[h].fall, hc[h].pr, hc[h].pf,
                                 h_coarse(h, k), h_coarse(h, k - 1), t) ^ hc[h].pol
                          : hc[h].pol;
            if (hc[h].pol && hc[h].en) n_pol++;
            if (!hc[h].en) n_disabled++;
          end else ex = 0;
          if (!ck(h_clk[h] == ex) && failures <= 20) $display("FAIL @%0t: %s", $time, $sformatf("h_clk[%0d] pixel %0d (+%0.1f ns)", h, k, t));
        end
        // low-frequency channels
        for (int v = 0; v < V_MAX; v++) begin
          bit ex;
          if (v < NV) begin
            if (near(t, dly(vc[v].pr)) || near(t, dly(vc[v].pf)) || near(t, 0.0)) continue;
            ex = fine(vc[v].rise == vc[v].fall, vc[v].pr, vc[v].pf,
                      v_coarse(v, k), v_coarse(v, k - 1), t);
          end else ex = 0;
          if (!ck(v_clk[v] == ex) && failures <= 20) $display("FAIL @%0t: %s", $time, $sformatf("v_clk[%0d] pixel %0d (+%0.1f ns)", v, k, t));
        end
      end
      k++;
      e += tper;
    end
  endtask

  initial begin
    int n_rep0;
    #100 por_n = 1;
    chk(!cfg_done, "cfg_done low after reset");
    // the RAM is cleared after reset (one word per clock); wait for it
    repeat (MEM_DEPTH + 8) @(posedge clk_in);
    chk(!dut.clearing, "RAM clear finished");
    configure(4);
    wait (cfg_done);
    chk(dut.divisor == 4, "divisor loaded");
    check_period(4 * TCLK);
    n_even++;
    tper  = 4 * TCLK;
    nlock = $rtoi($ceil(tper / UNIT));
    wait (dll_lock);
    chk(dut.u_dll.count == nlock, $sformatf("lock count %0d, expected %0d", dut.u_dll.count, nlock));
    n_rep0 = n_pat_rep;
    check_frames(2 * LINE * FRAME);
    // V0: 4 repeats of the pattern in every line
    chk(n_pat_rep - n_rep0 == 4 * 2 * FRAME,
        $sformatf("V0 pulses %0d, expected %0d", n_pat_rep - n_rep0, 4 * 2 * FRAME));

    // reload with an odd divisor
    wr(A_DIVISOR, 3);
    wr(START_ADDR, 0);
    wait (!cfg_done);
    #1;
    n_reload++;
    chk(!dll_lock, "DLL restarts on reload");
    wait (cfg_done);
    chk(dut.divisor == 3, "new divisor loaded");
    check_period(3 * TCLK);
    n_odd++;
    tper  = 3 * TCLK;
    nlock = $rtoi($ceil(tper / UNIT));
    wait (dll_lock);
    chk(dut.u_dll.count == nlock, $sformatf("lock count %0d, expected %0d", dut.u_dll.count, nlock));
    check_frames(LINE * FRAME);

    // every mechanism must have happened
    begin
      automatic string names [26] = '{"ram clear", "spi address word", "spi data word", "configuration load",
                            "dll lock", "even divisor", "odd divisor", "wide pulse (or)",
                            "wide pulse (and)", "one-pixel fine pulse", "pixel-rate clock",
                            "masked low", "masked with toggle high", "vertical masking",
                            "pattern repeat", "whole-line pattern", "hd", "vd", "exposure",
                            "clpob", "pblk", "horizontal blanking", "inverted polarity",
                            "disabled channel", "reload", "second lock"};
      automatic int cnt [26] = '{n_clear, n_addr_w, n_data_w, n_load, n_lock, n_even, n_odd, n_or,
                       n_and, n_short, n_pixrate, n_mask_low, n_mask_tog, n_vmask,
                       n_pat_rep, n_pat_whole, n_hd, n_vd, n_exp, n_clpob, n_pblk, n_hblk,
                       n_pol, n_disabled, n_reload, n_lock - 1};
      for (int i = 0; i < 26; i++) begin
        $display("mechanism %-24s happened %0d times", names[i], cnt[i]);
        chk(cnt[i] > 0, {"mechanism never happened: ", names[i]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
