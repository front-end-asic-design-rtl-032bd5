// Counter-based DLL controller.
//
// Runs on clkrefby2 (pixel clock / 2) so that each change of the delay line
// is seen by the phase detector before the next decision. count is the
// number of delay elements in the loop. After reset it starts at INIT_COUNT
// (more than half a pixel period at the design frequency, which avoids false
// locking), waits SETTLE cycles for the line to fill, then counts up by one
// each cycle while up is high. When up is seen low the feedback lags by a
// full period: count is frozen and lock rises. Should count pass NTAPS
// without locking it restarts from INIT_COUNT (modulo-96 counter).
// control is the one-hot decode of count: element NTAPS-count is the entry
// point of the input clock, so the last tap carries count unit delays.
// The XOR/up rule, the clkrefby2 clock, the fixed initial value and the
// one-hot decoder are the document's; INIT_COUNT and SETTLE are this
// design's. Lock time: SETTLE + (N - INIT_COUNT) + 1 cycles of clkrefby2.
`timescale 1ns/1ps
module dll_controller #(
  parameter int unsigned NTAPS      = 96,
  parameter int unsigned INIT_COUNT = 48,
  parameter int unsigned SETTLE     = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     up,
  output logic [$clog2(NTAPS+1)-1:0] count,
  output logic [NTAPS-1:0]         control,
  output logic                     lock
);
  localparam int unsigned CW = $clog2(NTAPS + 1);
  typedef enum logic [1:0] {S_SETTLE, S_TRACK, S_LOCK} state_t;
  state_t     state;
  logic [3:0] settle_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_SETTLE;
      count      <= CW'(INIT_COUNT);
      settle_cnt <= '0;
    end else begin
      unique case (state)
        S_SETTLE: begin
          settle_cnt <= settle_cnt + 1'b1;
          if (settle_cnt == 4'(SETTLE - 1)) state <= S_TRACK;
        end
        S_TRACK: begin
          if (up) count <= (count == CW'(NTAPS)) ? CW'(INIT_COUNT) : count + 1'b1;
          else    state <= S_LOCK;
        end
        default: ;  // locked: hold
      endcase
    end
  end

  assign lock = (state == S_LOCK);

  // one-hot entry select
  always_comb begin
    control = '0;
    for (int i = 0; i < NTAPS; i++)
      if (CW'(NTAPS - i) == count) control[i] = 1'b1;
  end
endmodule
