// ref_clk_model: reference oscillator for the loop testbenches (behavioural).
//
// Produces a square wave at F Hz. With JITTER_EN each rising edge is
// displaced from its ideal time by a Gaussian amount of standard deviation
// white2stddev(F, PN), i.e. flat (white) phase noise of PN dBc/Hz; the
// displacements do not accumulate. The Gaussian samples come from the same
// Mersenne-Twister and Box-Muller blocks the DCO noise uses, clocked by this
// model's own output.
module ref_clk_model
  import adpll_pkg::*;
#(
  parameter real         F         = F0REF,
  parameter real         PN        = REF_WHITE_PN,
  parameter bit          JITTER_EN = 1'b1,
  parameter logic [31:0] SEED      = 32'd12345
) (
  input  logic rst_n,
  output logic clk
);
  timeunit 1ps; timeprecision 1fs;

  localparam real SIGMA_PS = white2stddev(F, PN) * 1.0e12;
  localparam real T_PS     = 1.0e12 / F;

  logic rdy, vld;
  logic [31:0] rnd;
  real g;

  mt19937 u_mt (.clk, .rst_n, .seed(SEED), .en(rdy), .ready(rdy), .valid(vld), .rnd);
  box_muller u_bm (.clk, .rst_n, .en(vld), .u(rnd), .z(g));

  real t_ideal, t_rise;
  initial begin
    clk = 1'b0;
    t_ideal = 0.0;
    forever begin
      t_ideal = t_ideal + T_PS;
      t_rise  = t_ideal + (JITTER_EN ? SIGMA_PS * g : 0.0);
      #(t_rise - $realtime) clk = 1'b1;
      #(t_ideal + 0.5 * T_PS - $realtime) clk = 1'b0;
    end
  end
endmodule
