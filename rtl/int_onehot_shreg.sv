// int_onehot_shreg: integral path, graded varactors (coding C).
//
// A two-way shift register with exactly one bit set. Varactor k is sized
// C0 + k*Cdelta, so moving the hot bit up by one adds the fine step Cdelta.
// An UP-alone decision moves the bit up, a DN-alone decision moves it down;
// at either end it stays. Reset puts the bit at position 0. Step clock and
// direction as in the binary counter: rising edge of (UP | DN).
//
// Interface: up, dn, rst_n (async, active low); onehot out.
module int_onehot_shreg #(
  parameter int unsigned L = 64
) (
  input  logic         up,
  input  logic         dn,
  input  logic         rst_n,
  output logic [L-1:0] onehot
);
  timeunit 1ps; timeprecision 1fs;

  logic step_clk;
  assign step_clk = up | dn;

  always_ff @(posedge step_clk or negedge rst_n) begin
    if (!rst_n) begin
      onehot <= L'(1);
    end else begin
      unique case ({up, dn})
        2'b10:   if (!onehot[L-1]) onehot <= onehot << 1;
        2'b01:   if (!onehot[0])   onehot <= onehot >> 1;
        default: onehot <= onehot;
      endcase
    end
  end

  a_onehot: assert property (@(posedge step_clk) disable iff (!rst_n) $onehot(onehot));
endmodule
