// Initialization sequencer of the configuration memory.
//
// After power-on reset it clears the RAM (one address per clock, MEM_DEPTH
// cycles, SPI writes ignored meanwhile; `clearing` is high). It then passes
// SPI writes to the RAM. A write to START_ADDR, the fixed location written
// last, starts the read phase: addresses 0..CFG_WORDS-1 are read one by one
// into the configuration data-out registers (cfg), then, for every vertical
// clock, its pattern-group start, length and repeat entries are fetched from
// the pattern tables (group and indices taken from the clock's own words) into
// vpat. cfg_done then goes high. Another write to START_ADDR reloads
// everything; cfg_done is low while loading.
// The document gives the clear-on-reset, the RAM, the fixed start location and
// the one-by-one reads; the clearing sweep, the table look-up order and the
// one-cycle read latency are this design's choices.
`timescale 1ns/1ps
module init_sequencer
  import tg_pkg::*;
#(
  parameter int unsigned NUM_V      = V_MAX,
  parameter int unsigned START_ADR  = START_ADDR
) (
  input  logic              clk,
  input  logic              rst_n,
  // write requests from the SPI interface
  input  logic              wr_we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  // RAM port
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_waddr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic [ADDR_W-1:0] mem_raddr,
  input  logic [DATA_W-1:0] mem_rdata,
  // data-out registers
  output cfg_words_t        cfg,
  output vpat_words_t       vpat,
  output logic              clearing,
  output logic              cfg_done
);
  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_READ, S_PAT, S_DONE} state_t;
  state_t state;

  logic [ADDR_W-1:0] ptr;        // clear / read address
  logic [7:0]        pptr;       // pattern word index, 0..3*NUM_V-1
  logic [4:0]        v_idx;      // vertical clock of pptr
  logic [1:0]        k_idx;      // 0 start, 1 length, 2 repeat
  logic              cap;        // a read issued last cycle
  logic              cap_pat;    // it was a pattern read
  logic [8:0]        cap_idx;    // register it goes to
  logic [ADDR_W-1:0] pat_addr;

  // pattern table address of word (v_idx, k_idx)
  always_comb begin
    logic [1:0]  grp;
    logic [4:0]  idx;
    logic [15:0] w3, w4;
    w3  = cfg[V_BASE + V_WORDS*v_idx + 3];
    w4  = cfg[V_BASE + V_WORDS*v_idx + 4];
    grp = w3[13:12];
    unique case (k_idx)
      2'd0:    idx = w4[4:0];
      2'd1:    idx = w4[9:5];
      default: idx = w4[14:10];
    endcase
    unique case (k_idx)
      2'd0:    pat_addr = ADDR_W'(PAT_START_BASE) + ADDR_W'({grp, idx});
      2'd1:    pat_addr = ADDR_W'(PAT_LEN_BASE)   + ADDR_W'({grp, idx});
      default: pat_addr = ADDR_W'(PAT_REP_BASE)   + ADDR_W'({grp, idx});
    endcase
  end

  wire start_req = wr_we && (wr_addr == ADDR_W'(START_ADR));

  // RAM write port: zeros while clearing, SPI writes otherwise
  always_comb begin
    if (state == S_CLEAR) begin
      mem_we    = 1'b1;
      mem_waddr = ptr;
      mem_wdata = '0;
    end else begin
      mem_we    = wr_we;
      mem_waddr = wr_addr;
      mem_wdata = wr_data;
    end
    mem_raddr = (state == S_PAT) ? pat_addr : ptr;
  end

  assign clearing = (state == S_CLEAR);
  assign cfg_done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CLEAR;
      ptr     <= '0;
      pptr    <= '0;
      v_idx   <= '0;
      k_idx   <= '0;
      cap     <= 1'b0;
      cap_pat <= 1'b0;
      cap_idx <= '0;
      cfg     <= '0;
      vpat    <= '0;
    end else begin
      // capture the word read in the previous cycle
      cap <= 1'b0;
      if (cap) begin
        if (cap_pat) vpat[cap_idx] <= mem_rdata;
        else         cfg[cap_idx]  <= mem_rdata;
      end
      unique case (state)
        S_CLEAR: begin
          ptr <= ptr + 1'b1;
          if (ptr == ADDR_W'(MEM_DEPTH - 1)) state <= S_IDLE;
        end
        S_IDLE, S_DONE: begin
          if (start_req) begin
            state <= S_READ;
            ptr   <= '0;
          end
        end
        S_READ: begin
          cap     <= 1'b1;
          cap_pat <= 1'b0;
          cap_idx <= 9'(ptr);
          if (ptr == ADDR_W'(CFG_WORDS - 1)) begin
            state <= S_PAT;
            pptr  <= '0;
            v_idx <= '0;
            k_idx <= '0;
          end else begin
            ptr <= ptr + 1'b1;
          end
        end
        S_PAT: begin
          // the clock's own words were captured at least one cycle ago
          cap     <= 1'b1;
          cap_pat <= 1'b1;
          cap_idx <= 9'(pptr);
          pptr    <= pptr + 1'b1;
          if (k_idx == 2'd2) begin
            k_idx <= 2'd0;
            v_idx <= v_idx + 1'b1;
          end else begin
            k_idx <= k_idx + 1'b1;
          end
          if (pptr == 8'(3*NUM_V - 1)) state <= S_DONE;
        end
        default: state <= S_CLEAR;
      endcase
    end
  end
endmodule
