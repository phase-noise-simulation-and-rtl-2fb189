// tb_dco_osc: checks the oscillator period T = 1/(F0 + KDCO*(KP*p + KI*units))
// against hand-computed periods for several control words (noise off), the
// varactor-unit decoding of the three codings on the coding examples
// 01010 (binary, 10 units), 01111 (thermometer, 4) and 01000 (one-hot,
// position 3), and, with noise on, that the mean period stays at nominal
// while the period spreads.
module tb_dco_osc;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  logic rst_n = 1;
  logic [1:0] p;
  logic [11:0] ic;
  logic [4:0] w5;
  logic f_bin, f_una, f_one, f_nz, f_b5;
  real per, ctrl, per_n, ctrl_n, per_u, ctrl_u, per_o, ctrl_o, per_b5, ctrl_b5;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset

  dco_osc #(.NOISE_EN(4'b0000)) u_bin (.rst_n, .p_q(p), .ictl_q(ic), .fout(f_bin), .period(per), .ctrl);
  dco_osc #(.NOISE_EN(4'b1111)) u_nz  (.rst_n, .p_q(p), .ictl_q(ic), .fout(f_nz), .period(per_n), .ctrl(ctrl_n));
  dco_osc #(.CODING(CODING_BINARY), .W(5), .NOISE_EN(4'b0000)) u_b5  (.rst_n, .p_q(2'b01), .ictl_q(w5), .fout(f_b5), .period(per_b5), .ctrl(ctrl_b5));
  dco_osc #(.CODING(CODING_UNARY),  .W(5), .NOISE_EN(4'b0000)) u_una (.rst_n, .p_q(2'b01), .ictl_q(w5), .fout(f_una), .period(per_u), .ctrl(ctrl_u));
  dco_osc #(.CODING(CODING_ONEHOT), .W(5), .NOISE_EN(4'b0000)) u_one (.rst_n, .p_q(2'b01), .ictl_q(w5), .fout(f_one), .period(per_o), .ctrl(ctrl_o));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // measured period in ps between rising edges of the binary instance
  task automatic measure(output real t_ps);
    real t0;
    @(posedge f_bin); @(posedge f_bin); t0 = $realtime;
    @(posedge f_bin); t_ps = $realtime - t0;
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t, s1, s2, t0, m, sd;
    // hand-computed: 1e12 / (2.2e9 + 1e5 * units) ps
    real want [4] = '{454.545454545, 454.338936847, 434.404865334, 416.666666667};
    logic [1:0]  pv [4] = '{2'd0, 2'd1, 2'd2, 2'd0};
    logic [11:0] iv [4] = '{12'd0, 12'd0, 12'd1000, 12'd2000};
    #10 rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      p = pv[k]; ic = iv[k];
      measure(t);
      check(t > want[k] - 0.002 && t < want[k] + 0.002, $sformatf("period %0d: %f ps, want %f", k, t, want[k]));
    end
    // coding examples: ctrl = KP*1 + units
    w5 = 5'b01010; #5000; check(ctrl_b5 == 20.0, $sformatf("binary 01010 -> %f", ctrl_b5));
    w5 = 5'b01111; #5000; check(ctrl_u  == 14.0, $sformatf("thermometer 01111 -> %f", ctrl_u));
    w5 = 5'b01000; #5000; check(ctrl_o  == 13.0, $sformatf("one-hot 01000 -> %f", ctrl_o));
    check(per_o > 4.54276e-10 && per_o < 4.54278e-10, $sformatf("one-hot period %g", per_o));
    // noisy instance: 20000 periods at p=0, I=2000 (nominal 416.6667 ps)
    p = 2'd0; ic = 12'd2000;
    repeat (2000) @(posedge f_nz);
    s1 = 0; s2 = 0;
    @(posedge f_nz); t0 = $realtime;
    for (int k = 0; k < 20000; k++) begin
      @(posedge f_nz); t = $realtime - t0; t0 = $realtime;
      s1 += t; s2 += t * t;
    end
    m = s1 / 20000.0; sd = $sqrt(s2 / 20000.0 - m * m);
    check(m > 416.66 && m < 416.674, $sformatf("noisy mean period %f ps", m));
    check(sd > 0.05 && sd < 0.5, $sformatf("noisy period spread %f ps", sd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
