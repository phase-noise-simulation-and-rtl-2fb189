// int_updn_counter: integral path, binary-weighted varactors (coding A).
//
// A saturating up/down counter advanced once per PFD decision: the rising
// edge of (UP | DN) is the step clock, and the PFD state seen at that edge
// gives the direction (UP alone: +1, DN alone: -1, both: hold). One
// reference-leads pulse therefore adds exactly one unit, one feedback-leads
// pulse removes one. The count drives varactors sized 1, 2, 4, ... C0.
// The count saturates at 0 and at 2**W-1 because a varactor bank cannot hold
// a negative or overflowing capacitance; reset loads INIT (0).
//
// Interface: up, dn from the PFD; rst_n async active low; count out.
// Timing: count changes at the start of each UP or DN pulse.
module int_updn_counter #(
  parameter int unsigned W    = 12,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         up,
  input  logic         dn,
  input  logic         rst_n,
  output logic [W-1:0] count
);
  timeunit 1ps; timeprecision 1fs;

  logic step_clk;
  assign step_clk = up | dn;

  always_ff @(posedge step_clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= INIT;
    end else begin
      unique case ({up, dn})
        2'b10:   if (count != '1) count <= count + W'(1);
        2'b01:   if (count != '0) count <= count - W'(1);
        default: count <= count;
      endcase
    end
  end
endmodule
