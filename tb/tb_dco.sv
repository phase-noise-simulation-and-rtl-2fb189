// tb_dco: drives the DCO (noise off) with PFD-like UP/DN pulses and feedback
// edges and checks the loop-filter chain: the integral word counts UP-alone
// and DN-alone pulses, the proportional word seen at an FB edge is 2 while UP
// is high, 0 while DN is high and 1 otherwise, neither reaches the
// oscillator before the FB edge, and the oscillator period afterwards is
// 1/(2.2 GHz + 100 kHz * (10*p + I)).
module tb_dco;
  timeunit 1ps; timeprecision 1fs;
  logic up = 0, dn = 0, fb = 0, rst_n = 1, fout;
  logic [1:0] p_q;
  logic [11:0] ictl_q;
  real period, ctrl;
  int checks = 0, failures = 0;
  int model_i = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset

  dco #(.NOISE_EN(4'b0000)) dut (.up, .dn, .fb, .rst_n, .fout, .p_q, .ictl_q, .period, .ctrl);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic measure_check(int units, string what);
    real t0, t, want;
    @(posedge fout); @(posedge fout); t0 = $realtime;
    @(posedge fout); t = $realtime - t0;
    want = 1.0e12 / (2.2e9 + 1.0e5 * real'(units));
    check(t > want - 0.002 && t < want + 0.002, $sformatf("%s: period %f want %f", what, t, want));
  endtask

  task automatic fb_edge(); fb = 1; #1000; fb = 0; #1000; endtask

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10 rst_n = 1; #10;
    check(p_q == 2'b00 && ictl_q == 0, "reset state");
    measure_check(0, "intrinsic after reset");
    // reference leads three times: UP pulses, the FB edge samples UP high
    for (int k = 0; k < 3; k++) begin
      up = 1; #500;
      check(ictl_q == 12'(model_i), "integral not yet retimed");
      model_i++;
      fb_edge();
      check(p_q == 2'b10 && ictl_q == 12'(model_i), $sformatf("retimed UP: p=%b I=%0d", p_q, ictl_q));
      up = 0; #500;
    end
    measure_check(20 + model_i, "after UP");
    // feedback leads: DN pulse held across the FB edge
    dn = 1; #500; model_i--;
    fb_edge();
    check(p_q == 2'b00 && ictl_q == 12'(model_i), $sformatf("retimed DN: p=%b I=%0d", p_q, ictl_q));
    measure_check(0 + model_i, "after DN");
    dn = 0; #500;
    // in phase: nothing high at the FB edge
    fb_edge();
    check(p_q == 2'b01 && ictl_q == 12'(model_i), "retimed idle");
    measure_check(10 + model_i, "idle");
    // many UP-leading cycles raise the frequency step by step
    for (int k = 0; k < 50; k++) begin
      up = 1; #200; model_i++; dn = 1; #1; up = 0; dn = 0; #200;
      fb_edge();
    end
    check(ictl_q == 12'(model_i), $sformatf("after 50 lead cycles I=%0d", ictl_q));
    measure_check(10 + model_i, "after lead cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
