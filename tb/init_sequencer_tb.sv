// Testbench for init_sequencer (with the configuration RAM): checks the
// clear phase (MEM_DEPTH cycles, then every untouched word reads as 0),
// that random register and pattern-table writes end up in cfg and vpat
// exactly as a reference memory predicts (pattern entries looked up
// through each vertical clock's group and indices), the load time, and
// that a second write to the start address reloads.
`timescale 1ns/1ps
module init_sequencer_tb;
  import tg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_we = 0;
  logic [ADDR_W-1:0] wr_addr = 0;
  logic [DATA_W-1:0] wr_data = 0;
  logic mem_we;
  logic [ADDR_W-1:0] mem_waddr, mem_raddr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;
  cfg_words_t cfg;
  vpat_words_t vpat;
  logic clearing, cfg_done;
  logic [15:0] ref_m [MEM_DEPTH];
  int checks = 0, failures = 0;

  init_sequencer dut (.*);
  config_mem u_mem (.clk(clk), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                    .raddr(mem_raddr), .rdata(mem_rdata));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input int a, input logic [15:0] d);
    @(negedge clk); wr_we = 1; wr_addr = ADDR_W'(a); wr_data = d;
    if (a != START_ADDR) ref_m[a] = d;
    @(negedge clk); wr_we = 0;
  endtask

  task automatic check_all();
    for (int a = 0; a < CFG_WORDS; a++)
      chk(cfg[a] == ref_m[a], $sformatf("cfg[%0d] %h exp %h", a, cfg[a], ref_m[a]));
    for (int v = 0; v < V_MAX; v++) begin
      automatic logic [15:0] w3 = ref_m[V_BASE + V_WORDS*v + 3];
      automatic logic [15:0] w4 = ref_m[V_BASE + V_WORDS*v + 4];
      automatic int g = w3[13:12];
      chk(vpat[3*v]   == ref_m[PAT_START_BASE + 32*g + w4[4:0]],   $sformatf("start v%0d", v));
      chk(vpat[3*v+1] == ref_m[PAT_LEN_BASE   + 32*g + w4[9:5]],   $sformatf("len v%0d", v));
      chk(vpat[3*v+2] == ref_m[PAT_REP_BASE   + 32*g + w4[14:10]], $sformatf("rep v%0d", v));
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    int t0, n;
    for (int a = 0; a < MEM_DEPTH; a++) ref_m[a] = 0;
    #22 rst_n = 1;
    n = 0;
    while (clearing) begin @(posedge clk); n++; end
    chk(n >= MEM_DEPTH - 2 && n <= MEM_DEPTH + 2, $sformatf("clear took %0d cycles", n));
    // start with nothing written: all registers must be zero
    wr(START_ADDR, 0);
    wait (cfg_done);
    check_all();
    // random configuration, some vertical clocks only
    for (int k = 0; k < 300; k++) wr($urandom_range(0, CFG_WORDS - 1), 16'($urandom));
    for (int k = 0; k < 200; k++) wr($urandom_range(PAT_START_BASE, PAT_REP_BASE + 127), 16'($urandom));
    @(negedge clk); wr_we = 1; wr_addr = ADDR_W'(START_ADDR); wr_data = 0;
    @(negedge clk); wr_we = 0;
    t0 = 0;
    chk(!cfg_done, "cfg_done drops during reload");
    while (!cfg_done) begin @(posedge clk); t0++; end
    chk(t0 <= CFG_WORDS + 3*V_MAX + 4, $sformatf("load took %0d cycles", t0));
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
