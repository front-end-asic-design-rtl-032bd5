// Configuration memory: 1K x 16 single-clock RAM.
//
// One synchronous write port (we, waddr, wdata) and one read port whose data
// appears on rdata one clock after raddr (registered read, as an SRAM macro
// would behave). The array itself has no reset; the initialization sequencer
// clears it after power-on reset by writing zeros to every address.
`timescale 1ns/1ps
module config_mem #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
