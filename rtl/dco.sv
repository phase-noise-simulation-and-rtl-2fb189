// dco: digitally controlled oscillator with the loop filter built in
// (behavioural model: its oscillator core is analog).
//
// The PFD outputs drive the DCO directly; there is no separate loop filter.
// The filter's adder is the varactor bank itself (parallel capacitors add)
// and its gain ratio is the number of varactors given to each path:
//   proportional path: two gates (prop_path) switch two varactors at once,
//                      worth KP units, giving -1/0/+1 around the middle;
//   integral path:     one varactor step per PFD decision, stored in an
//                      up/down counter (coding A, binary varactors), a
//                      thermometer shift register (B, equal varactors) or a
//                      one-hot shift register (C, graded varactors);
//   retiming:          both control words are registered on the rising
//                      edge of the feedback clock FB before reaching the
//                      varactors (retiming_reg);
//   oscillator:        dco_osc turns the retimed word into a period.
// The default is coding A with a 12-bit counter, as in the reference
// configuration.
//
// Interface: up, dn from the PFD; fb feedback clock; rst_n async active low;
// fout DCO output; p_q, ictl_q retimed control words; period (s), ctrl
// (units) report the oscillator.
module dco
  import adpll_pkg::*;
#(
  parameter coding_e     CODING   = CODING_BINARY,
  parameter int unsigned IW       = 12,
  parameter int unsigned L        = 64,
  parameter real         F0       = F0DCO,
  parameter real         K_DCO    = KDCO,
  parameter real         K_P      = KP,
  parameter real         K_I      = KI,
  parameter logic [3:0]  NOISE_EN = 4'b1111,
  parameter logic [31:0] SEED     = 32'd5489,
  localparam int unsigned CW      = (CODING == CODING_BINARY) ? IW : L
) (
  input  logic          up,
  input  logic          dn,
  input  logic          fb,
  input  logic          rst_n,
  output logic          fout,
  output logic [1:0]    p_q,
  output logic [CW-1:0] ictl_q,
  output real           period,
  output real           ctrl
);
  timeunit 1ps; timeprecision 1fs;

  logic [1:0]    p;
  logic [CW-1:0] ictl;

  prop_path u_prop (.up, .dn, .p);

  if (CODING == CODING_UNARY) begin : g_int
    int_unary_shreg #(.L(CW)) u_int (.up, .dn, .rst_n, .therm(ictl));
  end else if (CODING == CODING_ONEHOT) begin : g_int
    int_onehot_shreg #(.L(CW)) u_int (.up, .dn, .rst_n, .onehot(ictl));
  end else begin : g_int
    int_updn_counter #(.W(CW)) u_int (.up, .dn, .rst_n, .count(ictl));
  end

  retiming_reg #(.W(CW)) u_retime (
    .fb, .rst_n, .p_in(p), .ictl_in(ictl), .p_q, .ictl_q);

  dco_osc #(
    .CODING(CODING), .W(CW), .F0(F0), .K_DCO(K_DCO), .K_P(K_P), .K_I(K_I),
    .NOISE_EN(NOISE_EN), .SEED(SEED)
  ) u_osc (.rst_n, .p_q, .ictl_q, .fout, .period, .ctrl);
endmodule
