// Clock divider: makes the pixel clock from the input clock.
//
// The 5-bit divisor (from the configuration memory) selects division by N
// with 50% duty cycle: an even-division path (a counter and one compare
// register on the rising edge) and an odd-division path (the same compare
// register ANDed with a copy retimed on the falling edge, which removes half
// an input period from the high time). A clock selection stage picks the path
// from the divisor's parity. Divisors above MAX_DIV are clamped to MAX_DIV;
// 0 and 1 pass the input clock through. clkrefby2 is the pixel clock divided
// by two (it clocks the DLL controller). The split into odd and even logic
// and the clock selection follow the document; the clamp and the 0/1 bypass
// are this design's choices. While rst_n is low both outputs stay low
// (except in bypass, where pixel_clk follows clk_in).
`timescale 1ns/1ps
module clock_divider #(
  parameter int unsigned MAX_DIV = 20
) (
  input  logic       clk_in,
  input  logic       rst_n,
  input  logic [4:0] divisor_in,
  output logic       pixel_clk,
  output logic       clkrefby2
);
  logic [4:0] div;
  logic [4:0] cnt;
  logic       q_pos;   // high for ceil(div/2) input cycles
  logic       q_neg;   // q_pos delayed by half an input cycle
  logic       odd_clk, even_clk;
  logic       bypass;

  assign div    = (divisor_in > 5'(MAX_DIV)) ? 5'(MAX_DIV) : divisor_in;
  assign bypass = (div <= 5'd1);

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      q_pos <= 1'b0;
    end else begin
      cnt   <= (cnt >= div - 5'd1) ? 5'd0 : cnt + 5'd1;
      q_pos <= (cnt >= div - 5'd1) ? 1'b1 : (cnt + 5'd1 < ((div + 5'd1) >> 1));
    end
  end

  always_ff @(negedge clk_in or negedge rst_n) begin
    if (!rst_n) q_neg <= 1'b0;
    else        q_neg <= q_pos;
  end

  assign even_clk = q_pos;
  assign odd_clk  = q_pos & q_neg;

  // clock selection
  always_comb begin
    if (bypass)      pixel_clk = clk_in;
    else if (div[0]) pixel_clk = odd_clk;
    else             pixel_clk = even_clk;
  end

  always_ff @(posedge pixel_clk or negedge rst_n) begin
    if (!rst_n) clkrefby2 <= 1'b0;
    else        clkrefby2 <= ~clkrefby2;
  end
endmodule
