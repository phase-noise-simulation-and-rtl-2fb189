// box_muller: Gaussian random numbers from uniform 32-bit words
// (behavioural model: uses real arithmetic and is not synthesizable).
//
// Box-Muller transform. Two consecutive uniform words u1, u2 are mapped to
// (0,1] and [0,1) and give two independent standard normal samples
//   r = sqrt(-2 ln u1),  z0 = r cos(2 pi u2),  z1 = r sin(2 pi u2).
// One word is consumed per enabled clock and one sample is produced per
// enabled clock: on the clock that brings u2 the output becomes z0, on the
// next enabled clock (which brings the next u1) it becomes the stored z1.
// Before the first pair completes the output is 0.
//
// Interface: clk, rst_n (async, active low), en with u; z is a real output,
// registered.
module box_muller (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] u,
  output real         z
);
  timeunit 1ps; timeprecision 1fs;

  localparam real TWO_PI = 6.28318530717958647692;
  localparam real TWO32  = 4294967296.0;

  logic second;     // next word is u2 of a pair
  real  u1, spare, r, ang;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second <= 1'b0;
      u1     <= 1.0;
      spare  <= 0.0;
      z      <= 0.0;
    end else if (en) begin
      if (!second) begin
        u1     <= (real'(u) + 1.0) / TWO32;
        z      <= spare;
        second <= 1'b1;
      end else begin
        r       = $sqrt(-2.0 * $ln(u1));
        ang     = TWO_PI * real'(u) / TWO32;
        z      <= r * $cos(ang);
        spare  <= r * $sin(ang);
        second <= 1'b0;
      end
    end
  end
endmodule
