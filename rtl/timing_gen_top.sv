// Programmable precision-delay timing generator for CCD detectors (top).
//
// Configuration side (clk_in domain): the SPI shifts in 17-bit words on
// s_clk, the SPI-to-memory interface turns them into address and data
// writes of the 1K x 16 configuration RAM, and the initialization sequencer
// (started by a write to the fixed START_ADDR) copies the configuration
// into data-out registers, which cfg_decode turns into per-block settings.
// cfg_done releases the clock side.
// Clock side: the clock divider makes the pixel clock (and clkrefby2) from
// clk_in with the programmed divisor; the DLL locks its 96-tap delay line to
// one pixel period; after the tap-calculation pipeline has settled
// (`stable`, a chain of flops behind the lock) all generators start
// together. NUM_H high-frequency and NUM_V low-frequency channels each
// produce a clock with coarse edges on the pixel grid and fine edges on the
// DLL tap grid. sync_gen makes HD/VD, exposure_gen the substrate clock and
// four mask_gen instances the horizontal and vertical masking signals, CLPOB
// and PBLK; mask_toggle gives the masking toggle position.
// The configuration registers are static while the clock side runs; they
// are written in the clk_in domain and only change while the clock side is
// held in reset (cfg_done low), so they cross domains without
// synchronizers.
`timescale 1ns/1ps
module timing_gen_top
  import tg_pkg::*;
#(
  parameter int unsigned NUM_H         = H_MAX,
  parameter int unsigned NUM_V         = V_MAX,
  parameter int unsigned NTAPS         = DLL_TAPS,
  parameter real         UNIT_DELAY_NS = 0.62
) (
  input  logic             clk_in,
  input  logic             por_n,
  input  logic             load,
  input  logic             s_clk,
  input  logic             s_data,
  output logic [NUM_H-1:0] h_clk,
  output logic [NUM_V-1:0] v_clk,
  output logic             hd,
  output logic             vd,
  output logic             sub_clk,
  output logic             clpob,
  output logic             pblk,
  output logic             hblk,
  output logic             vblk,
  output logic             pixel_clk,
  output logic             dll_lock,
  output logic             cfg_done
);
  localparam int unsigned NW = $clog2(NTAPS + 1);
  localparam int unsigned STABLE_STAGES = 4;   // tap_calc latency + 1

  // ---------------- reset synchronizer (clk_in) ----------------
  logic [1:0] por_sync;
  logic       rst_n;
  always_ff @(posedge clk_in or negedge por_n) begin
    if (!por_n) por_sync <= '0;
    else        por_sync <= {por_sync[0], 1'b1};
  end
  assign rst_n = por_sync[1];

  // ---------------- SPI and memory ----------------
  logic [DATA_W:0]   spi_word;
  logic              spi_tgl;
  logic [ADDR_W-1:0] wadd;
  logic [DATA_W-1:0] wdata;
  logic              spi_en, spi_we;
  logic              mem_we;
  logic [ADDR_W-1:0] mem_waddr, mem_raddr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;
  cfg_words_t        cfg;
  vpat_words_t       vpat;
  logic              clearing;

  spi u_spi (
    .s_clk(s_clk), .rst_n(por_n), .load(load), .s_data(s_data),
    .data_reg(spi_word), .word_tgl(spi_tgl)
  );

  spi_mem_if u_spi_if (
    .clk(clk_in), .rst_n(rst_n), .data_reg(spi_word), .word_tgl(spi_tgl),
    .wadd(wadd), .dataout(wdata), .en(spi_en), .we(spi_we)
  );

  init_sequencer #(.NUM_V(V_MAX)) u_seq (
    .clk(clk_in), .rst_n(rst_n),
    .wr_we(spi_we), .wr_addr(wadd), .wr_data(wdata),
    .mem_we(mem_we), .mem_waddr(mem_waddr), .mem_wdata(mem_wdata),
    .mem_raddr(mem_raddr), .mem_rdata(mem_rdata),
    .cfg(cfg), .vpat(vpat), .clearing(clearing), .cfg_done(cfg_done)
  );

  config_mem u_mem (
    .clk(clk_in), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

  // ---------------- control logic ----------------
  logic [4:0] divisor;
  sync_cfg_t  sync_c;
  exp_cfg_t   exp_c;
  mask_cfg_t  hmask_c, vmask_c, clpob_c, pblk_c;
  mtog_cfg_t  mtog_c;
  hclk_cfg_t  h_c [NUM_H];
  vclk_cfg_t  v_c [NUM_V];

  cfg_decode #(.NUM_H(NUM_H), .NUM_V(NUM_V)) u_dec (
    .cfg(cfg), .vpat(vpat), .divisor(divisor), .sync_c(sync_c), .exp_c(exp_c),
    .hmask_c(hmask_c), .vmask_c(vmask_c), .clpob_c(clpob_c), .pblk_c(pblk_c),
    .mtog_c(mtog_c), .h_c(h_c), .v_c(v_c)
  );

  // ---------------- clock divider and DLL ----------------
  logic             clkrefby2;
  logic             div_rst_n;
  logic [1:0]       px_sync;
  logic             px_rst_n;
  logic [NTAPS-1:0] taps;
  logic [NW-1:0]    n_lock;
  logic             dll_up;
  logic [STABLE_STAGES-1:0] stable_sr;
  logic             start;

  assign div_rst_n = rst_n & cfg_done;

  clock_divider u_div (
    .clk_in(clk_in), .rst_n(div_rst_n), .divisor_in(divisor),
    .pixel_clk(pixel_clk), .clkrefby2(clkrefby2)
  );

  always_ff @(posedge pixel_clk or negedge div_rst_n) begin
    if (!div_rst_n) px_sync <= '0;
    else            px_sync <= {px_sync[0], 1'b1};
  end
  assign px_rst_n = px_sync[1];

  dll #(.NTAPS(NTAPS), .UNIT_DELAY_NS(UNIT_DELAY_NS)) u_dll (
    .ref_clk(pixel_clk), .clkrefby2(clkrefby2), .rst_n(px_rst_n),
    .taps(taps), .count(n_lock), .up(dll_up), .lock(dll_lock)
  );

  // multiplier pipeline delay: start only once every tap value is valid
  always_ff @(posedge pixel_clk or negedge px_rst_n) begin
    if (!px_rst_n) stable_sr <= '0;
    else           stable_sr <= {stable_sr[STABLE_STAGES-2:0], dll_lock};
  end
  assign start = stable_sr[STABLE_STAGES-1];

  // ---------------- line/frame, exposure, masking ----------------
  logic line_start, frame_start;
  logic hmask_act, vmask_act, clpob_act, pblk_act, vmask_out;
  logic tog_state;

  sync_gen u_sync (
    .clk(pixel_clk), .rst_n(px_rst_n), .start(start),
    .hd_len(sync_c.hd_len), .vd_len(sync_c.vd_len),
    .hd_rise(sync_c.hd_rise), .vd_rise(sync_c.vd_rise),
    .hd_en(sync_c.hd_en), .hd_pol(sync_c.hd_pol),
    .vd_en(sync_c.vd_en), .vd_pol(sync_c.vd_pol),
    .hd(hd), .vd(vd), .line_start(line_start), .frame_start(frame_start)
  );

  exposure_gen u_exp (
    .clk(pixel_clk), .rst_n(px_rst_n), .start(start), .line_len(sync_c.hd_len),
    .tog(exp_c.tog), .en(exp_c.en), .pol(exp_c.pol), .sub_clk(sub_clk)
  );

  mask_gen u_hmask (
    .clk(pixel_clk), .rst_n(px_rst_n), .start(start), .line_len(sync_c.hd_len),
    .tog(hmask_c.tog), .en(hmask_c.en), .pol(hmask_c.pol), .active(hmask_act), .out(hblk)
  );

  mask_gen u_vmask (
    .clk(pixel_clk), .rst_n(px_rst_n), .start(start), .line_len(sync_c.hd_len),
    .tog(vmask_c.tog), .en(vmask_c.en), .pol(vmask_c.pol), .active(vmask_act), .out(vmask_out)
  );
  assign vblk = vmask_out;

  mask_gen u_clpob (
    .clk(pixel_clk), .rst_n(px_rst_n), .start(start), .line_len(sync_c.hd_len),
    .tog(clpob_c.tog), .en(clpob_c.en), .pol(clpob_c.pol), .active(clpob_act), .out(clpob)
  );

  mask_gen u_pblk (
    .clk(pixel_clk), .rst_n(px_rst_n), .start(start), .line_len(sync_c.hd_len),
    .tog(pblk_c.tog), .en(pblk_c.en), .pol(pblk_c.pol), .active(pblk_act), .out(pblk)
  );

  mask_toggle u_mtog (
    .clk(pixel_clk), .rst_n(px_rst_n), .start(start), .hd_len(sync_c.hd_len),
    .tog_pos(mtog_c.pos), .en(mtog_c.en), .toggle_en(tog_state)
  );

  // ---------------- clock channels ----------------
  for (genvar h = 0; h < NUM_H; h++) begin : g_h
    h_channel #(.NTAPS(NTAPS)) u_ch (
      .pclk(pixel_clk), .rst_n(px_rst_n), .start(start), .c(h_c[h]),
      .taps(taps), .n_lock(n_lock), .mask(hmask_act), .tog_state(tog_state),
      .clk_out(h_clk[h])
    );
  end

  for (genvar v = 0; v < NUM_V; v++) begin : g_v
    v_channel #(.NTAPS(NTAPS)) u_ch (
      .pclk(pixel_clk), .rst_n(px_rst_n), .start(start), .c(v_c[v]),
      .taps(taps), .n_lock(n_lock), .mask(vmask_act), .line_len(sync_c.hd_len),
      .clk_out(v_clk[v])
    );
  end
endmodule
