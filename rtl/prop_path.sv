// prop_path: proportional path of the DCO's built-in loop filter.
//
// Two gates drive the two proportional varactors straight from the PFD:
//   p[0] = UP XNOR DN,  p[1] = UP AND NOT DN.
// Read as a number, p is 0 (DN only), 1 (neither or both) or 2 (UP only), so
// p-1 is the signed proportional correction -1 / 0 / +1; the constant -1 is
// absorbed into the oscillator's fixed capacitance. Purely combinational.
module prop_path (
  input  logic       up,
  input  logic       dn,
  output logic [1:0] p
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    p[0] = ~(up ^ dn);
    p[1] = up & ~dn;
  end
endmodule
