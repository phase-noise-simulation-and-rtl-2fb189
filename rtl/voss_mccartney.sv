// voss_mccartney: pink (1/f) noise generator, Voss-McCartney method.
//
// ROWS rows each hold a random value. A counter advances once per sample; the
// row whose index equals the number of trailing zeros of the new count is
// replaced with a fresh random value, so row k changes every 2^(k+1)
// samples. The output is the sum of all rows plus one fresh white value per
// sample (McCartney's addition that flattens the top octave). Each octave of
// rows contributes equal power per octave, which gives a -10 dB/decade
// spectrum over about ROWS octaves. The sum is kept as a running total: the
// replaced row's old value is subtracted and the new value added.
//
// Random input: the upper IN_W bits of `rnd` are the row value, the lower
// IN_W bits the white term, both read as signed. With all rows filled the
// output variance is (ROWS+1) times that of one uniform IN_W-bit value.
//
// Interface: clk, rst_n (async, active low, clears rows and sum), en with
// rnd; pink is registered and changes in the clock after en.
module voss_mccartney #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = IN_W + $clog2(ROWS + 2)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [2*IN_W-1:0]       rnd,
  output logic signed [OUT_W-1:0] pink
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic signed [IN_W-1:0]  rows [ROWS];
  logic signed [OUT_W-1:0] sum, sum_nxt;
  logic [ROWS-1:0]         cnt, cnt_nxt;
  logic [RW-1:0]           sel;
  logic                    upd;
  logic signed [IN_W-1:0]  row_new, white;

  always_comb begin
    cnt_nxt = cnt + ROWS'(1);
    upd     = (cnt_nxt != '0);
    sel     = '0;
    for (int k = ROWS - 1; k >= 0; k--) begin
      if (cnt_nxt[k]) sel = RW'(k);
    end
    row_new = rnd[2*IN_W-1:IN_W];
    white   = rnd[IN_W-1:0];
    sum_nxt = upd ? sum - OUT_W'(rows[sel]) + OUT_W'(row_new) : sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      sum  <= '0;
      pink <= '0;
      for (int k = 0; k < ROWS; k++) rows[k] <= '0;
    end else if (en) begin
      cnt  <= cnt_nxt;
      sum  <= sum_nxt;
      pink <= sum_nxt + OUT_W'(white);
      if (upd) rows[sel] <= row_new;
    end
  end
endmodule
