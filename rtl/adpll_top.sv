// adpll_top: all-digital PLL, reference configuration 24 MHz -> 2.4 GHz.
//
// REF and the divided DCO output FB meet in a three-state PFD (pfd). Its UP
// and DN pulses drive the DCO (dco) directly: the DCO contains the
// proportional and integral paths of the loop filter as varactor switches,
// and its control words are retimed on FB. The DCO output OUT is divided by
// div_ratio (fdiv) to form FB. With the defaults (F0 = 2.2 GHz,
// KDCO = 100 kHz/unit, KP = 10, KI = 1, ratio 100) the integral path climbs
// one 100 kHz unit per reference period until OUT = 100 * 24 MHz, then
// settles in a shrinking limit cycle. DCO noise (jitter, flicker, wander,
// saunter) is on by default; NOISE_EN = 0 gives the noise-free loop.
//
// Interface: ref_clk, rst_n (async, active low), div_ratio in; out, fb, up,
// dn, the retimed control words, and the DCO's current period (s) and
// control value (units) out.
module adpll_top
  import adpll_pkg::*;
#(
  parameter coding_e     CODING    = CODING_BINARY,
  parameter int unsigned IW        = 12,
  parameter int unsigned L         = 64,
  parameter int unsigned DIV_WIDTH = 8,
  parameter real         F0        = F0DCO,
  parameter real         K_DCO     = KDCO,
  parameter real         K_P       = KP,
  parameter real         K_I       = KI,
  parameter logic [3:0]  NOISE_EN  = 4'b1111,
  parameter logic [31:0] SEED      = 32'd5489,
  localparam int unsigned CW       = (CODING == CODING_BINARY) ? IW : L
) (
  input  logic                 ref_clk,
  input  logic                 rst_n,
  input  logic [DIV_WIDTH-1:0] div_ratio,
  output logic                 out,
  output logic                 fb,
  output logic                 up,
  output logic                 dn,
  output logic [1:0]           p_q,
  output logic [CW-1:0]        ictl_q,
  output real                  period,
  output real                  ctrl
);
  timeunit 1ps; timeprecision 1fs;

  pfd u_pfd (.fref(ref_clk), .fdiv(fb), .rst_n, .up, .dn);

  dco #(
    .CODING(CODING), .IW(IW), .L(L), .F0(F0), .K_DCO(K_DCO), .K_P(K_P),
    .K_I(K_I), .NOISE_EN(NOISE_EN), .SEED(SEED)
  ) u_dco (.up, .dn, .fb, .rst_n, .fout(out), .p_q, .ictl_q, .period, .ctrl);

  fdiv #(.DIV_WIDTH(DIV_WIDTH)) u_div (
    .clk(out), .rst_n, .ratio(div_ratio), .div_out(fb));
endmodule
