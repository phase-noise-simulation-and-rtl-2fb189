// tb_adpll_phase_noise: phase-noise measurement of the locked ADPLL at its
// default parameters (all DCO noise on, N = 100), next to three references:
//   - the DCO alone, open loop, at the same 2.4 GHz (p = 1, I = 1990);
//   - the loop at defaults with a clean 24 MHz reference;
//   - the loop at defaults with a -130 dBc/Hz white-noise reference;
//   - the loop with no noise anywhere (printed only).
//
// After 200 us of settling, the time of every rising output edge is recorded
// for 236 us. The edge-time error against a straight line (mean period)
// gives the output phase phi = 2 pi f0 x. The single-sideband phase noise
// L(f) = S_phi(f)/2 is estimated at a few offsets by Welch's method: 10-us
// segments (100 kHz resolution), Hann window, 50 % overlap, one DFT bin per
// offset. Open-loop expectation from the DCO noise levels, summing the
// white, pink, red and infrared contributions at each offset:
//   1 MHz  : -116.8 dBc/Hz       10 MHz : -136.6 dBc/Hz
// The open-loop DCO must meet these to +-3 dB. The closed loop with a clean
// reference must be within 6 dB of -116.6 dBc/Hz at 1 MHz, the value
// reported for this configuration. With the noisy reference the jitter of
// the reference randomises the bang-bang UP/DN decisions, and the 1 MHz
// proportional steps then raise the spectrum; that case is printed, not
// checked.
module tb_adpll_phase_noise;
  timeunit 1ps; timeprecision 1fs;
  localparam real T_SETTLE_PS = 200.0e6;
  localparam real T_END_PS    = 436.0e6;
  localparam real PI = 3.14159265358979323846;
  logic rst_n = 1, ref_clk, out, fb, up, dn;
  logic [1:0] p_q;
  logic [11:0] ictl_q;
  real period, ctrl;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset

  ref_clk_model u_ref (.rst_n, .clk(ref_clk));

  adpll_top dut (
    .ref_clk, .rst_n, .div_ratio(8'd100), .out, .fb, .up, .dn, .p_q, .ictl_q,
    .period, .ctrl);

  // open-loop DCO at the same frequency: p = 1, I = 1990 -> 2000 units
  logic out_ol;
  real period_ol, ctrl_ol;
  dco_osc u_ol (.rst_n, .p_q(2'b01), .ictl_q(12'd1990), .fout(out_ol), .period(period_ol), .ctrl(ctrl_ol));

  // closed loop without any noise (clean reference, DCO noise off)
  logic ref_clean, out_q, fb_q, up_q, dn_q;
  logic [1:0] p_q_q;
  logic [11:0] ictl_q_q;
  real period_q, ctrl_q;
  ref_clk_model #(.JITTER_EN(1'b0)) u_ref_q (.rst_n, .clk(ref_clean));
  adpll_top #(.NOISE_EN(4'b0000)) dut_q (
    .ref_clk(ref_clean), .rst_n, .div_ratio(8'd100), .out(out_q), .fb(fb_q), .up(up_q),
    .dn(dn_q), .p_q(p_q_q), .ictl_q(ictl_q_q), .period(period_q), .ctrl(ctrl_q));

  // closed loop at defaults with a clean reference
  logic out_c, fb_c, up_c, dn_c;
  logic [1:0] p_q_c;
  logic [11:0] ictl_q_c;
  real period_c, ctrl_c;
  adpll_top dut_c (
    .ref_clk(ref_clean), .rst_n, .div_ratio(8'd100), .out(out_c), .fb(fb_c), .up(up_c),
    .dn(dn_c), .p_q(p_q_c), .ictl_q(ictl_q_c), .period(period_c), .ctrl(ctrl_c));

  real t_edge [$], t_ol [$], t_q [$], t_c [$];
  always @(posedge out_q) if ($realtime > T_SETTLE_PS) t_q.push_back($realtime);
  always @(posedge out_c) if ($realtime > T_SETTLE_PS) t_c.push_back($realtime);
  always @(posedge out) if ($realtime > T_SETTLE_PS) t_edge.push_back($realtime);
  always @(posedge out_ol) if ($realtime > T_SETTLE_PS) t_ol.push_back($realtime);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // L(f) in dBc/Hz at offset f_hz from the recorded edges
  function automatic real ssb_dbc(real f_hz, int which);
    real te [$];
    int n, ns, nseg, m;
    real tp, f0, w, wsum2, re, im, ph, acc, x;
    te  = (which == 1) ? t_ol : (which == 2) ? t_q : (which == 3) ? t_c : t_edge;
    n   = te.size();
    tp  = (te[n-1] - te[0]) / real'(n - 1);  // mean period, ps
    f0  = 1.0e12 / tp;
    ns  = int'(10.0e6 / tp);                          // 10-us segments
    m   = int'(f_hz * 10.0e-6);                       // DFT bin
    wsum2 = 0.0;
    for (int k = 0; k < ns; k++) begin
      w = 0.5 - 0.5 * $cos(2.0 * PI * k / ns);
      wsum2 += w * w;
    end
    acc = 0.0; nseg = 0;
    for (int s = 0; s + ns <= n; s += ns / 2) begin
      re = 0.0; im = 0.0;
      for (int k = 0; k < ns; k++) begin
        x  = (te[s+k] - te[0] - real'(s + k) * tp) * 1.0e-12;  // s
        ph = 2.0 * PI * f0 * x;
        w  = 0.5 - 0.5 * $cos(2.0 * PI * k / ns);
        re += w * ph * $cos(2.0 * PI * m * k / ns);
        im -= w * ph * $sin(2.0 * PI * m * k / ns);
      end
      acc += re * re + im * im;
      nseg++;
    end
    // one-sided S_phi = 2|X|^2 / (fs * sum w^2); L = S_phi / 2
    return 10.0 * $log10(acc / nseg / (f0 * wsum2));
  endfunction

  initial begin
    #((T_END_PS + 10.0e6)); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real l300k, l1m, l10m, cl1m, q1m, nr1m;
    #100000 rst_n = 1;
    #(T_END_PS - 100000.0);
    check(t_edge.size() > 500000, $sformatf("%0d edges recorded", t_edge.size()));
    l300k = ssb_dbc(0.3e6, 1);
    l1m   = ssb_dbc(1.0e6, 1);
    l10m  = ssb_dbc(10.0e6, 1);
    $display("open-loop DCO:       L(300 kHz) %.2f, L(1 MHz) %.2f, L(10 MHz) %.2f dBc/Hz", l300k, l1m, l10m);
    check(l1m > -119.8 && l1m < -113.8, "open loop L(1 MHz) within 3 dB of -116.8 dBc/Hz");
    check(l10m > -139.6 && l10m < -133.6, "open loop L(10 MHz) within 3 dB of -136.6 dBc/Hz");
    cl1m  = ssb_dbc(1.0e6, 3);
    $display("closed loop, clean reference: L(300 kHz) %.2f, L(1 MHz) %.2f, L(10 MHz) %.2f dBc/Hz",
             ssb_dbc(0.3e6, 3), cl1m, ssb_dbc(10.0e6, 3));
    check(cl1m > -122.6 && cl1m < -110.6, "closed loop L(1 MHz) within 6 dB of -116.6 dBc/Hz");
    nr1m  = ssb_dbc(1.0e6, 0);
    $display("closed loop, noisy reference: L(300 kHz) %.2f, L(1 MHz) %.2f, L(10 MHz) %.2f dBc/Hz",
             ssb_dbc(0.3e6, 0), nr1m, ssb_dbc(10.0e6, 0));
    q1m   = ssb_dbc(1.0e6, 2);
    $display("closed loop, no noise at all: L(300 kHz) %.2f, L(1 MHz) %.2f, L(10 MHz) %.2f dBc/Hz",
             ssb_dbc(0.3e6, 2), q1m, ssb_dbc(10.0e6, 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
