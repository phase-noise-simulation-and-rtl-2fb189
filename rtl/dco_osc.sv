// dco_osc: oscillator core and varactor bank of the DCO
// (behavioural model of an analog LC oscillator; not synthesizable).
//
// The retimed control bits switch varactors in or out. Their sum, in unit
// varactors, is
//   ctrl = KP * p + KI * units(ictl)
// where p is the 2-bit proportional word read as a number (0, 1 or 2) and
// units() counts integral varactors according to the coding: the binary
// value (coding A), the number of ones (coding B) or the index of the hot
// bit (coding C, in fine steps). The oscillator period is
//   T = 1 / (F0 + KDCO * ctrl) + dperiod
// with dperiod the noise perturbation from dco_noise. Varactor off-state
// capacitance is folded into F0. Each period is computed at the rising edge
// that starts it; the output falls after T/2 and rises after T. Edge times
// are kept as absolute reals and each wait is rounded to the 1 fs time
// precision against the ideal edge, so rounding never accumulates.
//
// Interface: rst_n resets the noise generators only (the oscillator always
// runs, starting high at time 0); p_q and ictl_q from the retiming
// registers; fout out; period (seconds) and ctrl report the period in use.
module dco_osc
  import adpll_pkg::*;
#(
  parameter coding_e     CODING    = CODING_BINARY,
  parameter int unsigned W         = 12,
  parameter real         F0        = F0DCO,
  parameter real         K_DCO     = KDCO,
  parameter real         K_P       = KP,
  parameter real         K_I       = KI,
  parameter logic [3:0]  NOISE_EN  = 4'b1111,
  parameter logic [31:0] SEED      = 32'd5489
) (
  input  logic         rst_n,
  input  logic [1:0]   p_q,
  input  logic [W-1:0] ictl_q,
  output logic         fout,
  output real          period,
  output real          ctrl
);
  timeunit 1ps; timeprecision 1fs;

  real dperiod, jit, flk, wnd, sau;
  logic nz_active;

  dco_noise #(.F0(F0), .NOISE_EN(NOISE_EN), .SEED(SEED)) u_noise (
    .clk(fout), .rst_n, .active(nz_active),
    .jit, .flk, .wnd, .sau, .dperiod);

  function automatic int unsigned units(logic [W-1:0] word);
    int unsigned n;
    n = 0;
    case (CODING)
      CODING_UNARY:  n = $countones(word);
      CODING_ONEHOT: for (int k = 0; k < W; k++) if (word[k]) n = k;
      default:       n = int'(word);
    endcase
    return n;
  endfunction

  always_comb ctrl = K_P * real'(p_q) + K_I * real'(units(ictl_q));

  real t_edge, per;
  initial begin
    fout   = 1'b1;
    t_edge = 0.0;
    period = 1.0 / F0;
    forever begin
      per = 1.0 / (F0 + K_DCO * ctrl) + dperiod;
      if (per <= 0.0) $fatal(1, "dco_osc: non-positive period %g", per);
      period = per;
      t_edge = t_edge + per * 0.5e12;
      #(t_edge - $realtime) fout = 1'b0;
      t_edge = t_edge + per * 0.5e12;
      #(t_edge - $realtime) fout = 1'b1;
    end
  end
endmodule
