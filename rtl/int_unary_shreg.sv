// int_unary_shreg: integral path, equal-sized varactors (coding B).
//
// A two-way shift register holding a thermometer code: the low bits are ones.
// On each UP-alone decision a one is shifted in at the bottom (one more
// varactor on); on each DN-alone decision a zero is shifted in at the top
// (one fewer). The number of ones is the integral value; a full or empty
// register saturates by itself. Step clock and direction as in the binary
// counter: rising edge of (UP | DN), direction from the PFD state.
//
// Interface: up, dn, rst_n (async, active low, loads all zeros); therm out.
module int_unary_shreg #(
  parameter int unsigned L = 64
) (
  input  logic         up,
  input  logic         dn,
  input  logic         rst_n,
  output logic [L-1:0] therm
);
  timeunit 1ps; timeprecision 1fs;

  logic step_clk;
  assign step_clk = up | dn;

  always_ff @(posedge step_clk or negedge rst_n) begin
    if (!rst_n) begin
      therm <= '0;
    end else begin
      unique case ({up, dn})
        2'b10:   therm <= {therm[L-2:0], 1'b1};
        2'b01:   therm <= {1'b0, therm[L-1:1]};
        default: therm <= therm;
      endcase
    end
  end

  // A thermometer code never has a one above a zero.
  a_thermometer: assert property (@(posedge step_clk) disable iff (!rst_n)
    ((therm + L'(1)) & therm) == '0);
endmodule
