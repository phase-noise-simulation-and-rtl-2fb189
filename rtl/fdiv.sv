// fdiv: programmable frequency divider, DCO output -> feedback clock.
//
// A counter runs from 0 to ratio-1 on the rising edges of clk and wraps. The
// registered output is low for the first floor(ratio/2) counts and high for
// the rest, so the output has exactly one rising edge every `ratio` input
// periods (period T*ratio) and a 50 % duty cycle for even ratios. After reset
// the output is low and the counter at 0; the first rising edge comes
// floor(ratio/2) clocks after reset is released.
//
// A behavioural counter stands in for a dual-modulus divider. Counting only
// rising edges (rather than both edges) is this design's choice so that the
// block is a single-clock synchronous counter; it keeps the feedback edge
// spacing of N input periods. Ratios below 2 are treated as 2.
//
// Interface: clk (DCO output), rst_n (async, active low), ratio, div_out.
module fdiv #(
  parameter int unsigned DIV_WIDTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DIV_WIDTH-1:0] ratio,
  output logic                 div_out
);
  timeunit 1ps; timeprecision 1fs;

  logic [DIV_WIDTH-1:0] cnt, cnt_nxt, last, half;

  always_comb begin
    last    = (ratio < DIV_WIDTH'(2)) ? DIV_WIDTH'(1) : ratio - DIV_WIDTH'(1);
    half    = (last + DIV_WIDTH'(1)) >> 1;
    cnt_nxt = (cnt >= last) ? '0 : cnt + DIV_WIDTH'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      div_out <= 1'b0;
    end else begin
      cnt  <= cnt_nxt;
      div_out <= (cnt_nxt >= half);
    end
  end
endmodule
