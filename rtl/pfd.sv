// pfd: three-state phase/frequency detector.
//
// Two edge-triggered flip-flops with their D inputs tied high: the rising
// edge of the reference sets UP, the rising edge of the divided feedback sets
// DN. As soon as both are set, their AND clears both asynchronously, so in
// steady state only the earlier of the two inputs leaves a pulse whose width
// is the phase difference. If the reference leads, UP pulses; if the feedback
// leads, DN pulses; in phase, neither does. An active-low reset also clears
// both. The AND-gate delay that gives a real circuit a brief UP&DN overlap is
// zero here: the overlap lasts no simulated time.
//
// Interface: fref, fdiv in; up, dn out; rst_n active-low asynchronous.
module pfd (
  input  logic fref,
  input  logic fdiv,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  timeunit 1ps; timeprecision 1fs;

  logic clr;
  assign clr = ~rst_n | (up & dn);

  always_ff @(posedge fref or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge fdiv or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end
endmodule
