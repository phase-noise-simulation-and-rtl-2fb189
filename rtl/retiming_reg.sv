// retiming_reg: retiming registers between the loop-filter logic and the
// varactors.
//
// On each rising edge of the feedback clock FB the proportional bits and the
// integral control word are captured, so the DCO frequency changes only once
// per reference period, at a fixed phase of the feedback clock. The
// registers see the PFD state just before the FB edge (the usual
// register-sampling rule). Reset clears everything, which sets the DCO to its
// intrinsic frequency.
//
// Interface: fb clock, rst_n async active low; p_in/ictl_in in, p_q/ictl_q out.
module retiming_reg #(
  parameter int unsigned W = 12
) (
  input  logic         fb,
  input  logic         rst_n,
  input  logic [1:0]   p_in,
  input  logic [W-1:0] ictl_in,
  output logic [1:0]   p_q,
  output logic [W-1:0] ictl_q
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge fb or negedge rst_n) begin
    if (!rst_n) begin
      p_q    <= 2'b00;
      ictl_q <= '0;
    end else begin
      p_q    <= p_in;
      ictl_q <= ictl_in;
    end
  end
endmodule
