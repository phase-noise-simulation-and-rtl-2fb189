// tb_adpll_full: the ADPLL at its default parameters (all four DCO noise
// classes on) with a reference carrying -130 dBc/Hz white phase noise, run
// for 436 us, the length of the reference step-response runs.
//
// Checked: the loop pulls in (first 1-us window at or above 2.4 GHz before
// 150 us); once locked (after 200 us) the mean output frequency is
// 100 x 24 MHz to within 50 ppm, which only phase lock gives; the FB edge
// stays within 10 ns of the REF edge (a quarter reference period); the
// measured output periods deviate from the noise-free period by the rms the
// noise levels predict (+-10 %), and the 1-us frequency averages stay within
// 2 % of 2.4 GHz. Counted, and required at least once:
// UP pulses, DN pulses, UP&DN overlap resets, integral increments and
// decrements, retimed proportional +1 and 0, and DCO noise being active.
module tb_adpll_full;
  timeunit 1ps; timeprecision 1fs;
  localparam real SIM_US = 436.0;
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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_up = 0, n_dn = 0, n_both = 0, n_inc = 0, n_dec = 0, n_noisy = 0;
  int n_p [3] = '{0, 0, 0};
  logic [11:0] last_i = 0;
  always @(posedge up) if (!dn) n_up++;
  always @(posedge dn) if (!up) n_dn++;
  always @(up or dn) if (up && dn) n_both++;
  always @(posedge fb) begin
    #1;
    if (p_q <= 2) n_p[p_q]++;
    if (ictl_q > last_i) n_inc++;
    if (ictl_q < last_i) n_dec++;
    last_i = ictl_q;
  end
  // the period in use differs from the noise-free value 1/(F0 + KDCO*ctrl)
  // and the measured output periods scatter around it by the expected rms
  real t_prev_out = 0.0, ideal_prev = 0.0, dev2 = 0.0;
  int n_dev = 0;
  always @(posedge out) begin
    real ideal, dev;
    ideal = 1.0 / (2.2e9 + 1.0e5 * ctrl);
    if (period - ideal > 1e-16 || ideal - period > 1e-16) n_noisy++;
    if ($realtime > 200.0e6) begin
      dev = ($realtime - t_prev_out) * 1.0e-12 - ideal_prev;
      dev2 += dev * dev; n_dev++;
    end
    t_prev_out = $realtime;
    ideal_prev = ideal;
  end

  real f_win [$];
  real t_first = -1.0, t_last, t_lock0 = -1.0;
  int edges = 0, lock_edges = 0;
  always @(posedge out) begin
    if ($realtime > 100000.0) begin
      if (t_first < 0) t_first = $realtime;
      t_last = $realtime;
      edges++;
      if (t_last - t_first >= 1.0e6) begin
        f_win.push_back(real'(edges - 1) / ((t_last - t_first) * 1.0e-12));
        t_first = t_last; edges = 1;
      end
    end
    if ($realtime > 200.0e6) begin
      if (t_lock0 < 0) t_lock0 = $realtime;
      lock_edges++;
    end
  end

  real t_ref = 0.0, max_err = 0.0;
  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge fb) if ($realtime > 200.0e6) begin
    real e;
    e = $realtime - t_ref;
    if (e > 20833.0) e = e - 41666.67;
    if (e < 0) e = -e;
    if (e > max_err) max_err = e;
  end

  initial begin
    #(SIM_US * 1.0e6 + 5.0e6); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_cross;
    real f_mean, s1, s2, sd;
    #100000 rst_n = 1;
    #(SIM_US * 1.0e6 - 100000.0);
    check(f_win.size() > 400, $sformatf("%0d windows", f_win.size()));
    t_cross = -1;
    foreach (f_win[k]) if (t_cross < 0 && f_win[k] >= 2.4e9) t_cross = k;
    check(t_cross >= 0 && t_cross < 150, $sformatf("pull-in at %0d us", t_cross));
    f_mean = real'(lock_edges - 1) / ((t_last - t_lock0) * 1.0e-12);
    check(f_mean > 2.4e9 * (1.0 - 50e-6) && f_mean < 2.4e9 * (1.0 + 50e-6),
          $sformatf("locked mean %f Hz", f_mean));
    s1 = 0; s2 = 0;
    for (int k = 200; k < f_win.size(); k++) begin
      check(f_win[k] > 2.352e9 && f_win[k] < 2.448e9, $sformatf("window %0d: %g", k, f_win[k]));
      s1 += f_win[k]; s2 += f_win[k] * f_win[k];
    end
    s1 = s1 / real'(f_win.size() - 200);
    sd = $sqrt(s2 / real'(f_win.size() - 200) - s1 * s1);
    // per-period deviation: sqrt(2*sj^2 + (4/17)*sf^2 + sw^2 + ss^2) with the
    // hand-computed sigmas 1.0730e-13, 1.2226e-14, 9.691e-15, 1.96e-16 s
    check($sqrt(dev2 / n_dev) > 0.9 * 1.5217e-13 && $sqrt(dev2 / n_dev) < 1.1 * 1.5217e-13,
          $sformatf("period deviation rms %g s", $sqrt(dev2 / n_dev)));
    check(max_err < 10000.0, $sformatf("FB-REF error %f ps", max_err));
    $display("pull-in %0d us, locked mean %f Hz, 1-us spread %g Hz, period rms dev %g s, FB-REF max %f ps",
             t_cross, f_mean, sd, $sqrt(dev2 / n_dev), max_err);
    $display("mechanisms: up %0d dn %0d both %0d inc %0d dec %0d p(-1,0,+1) %0d %0d %0d noisy periods %0d",
             n_up, n_dn, n_both, n_inc, n_dec, n_p[0], n_p[1], n_p[2], n_noisy);
    check(n_up > 0, "UP pulses"); check(n_dn > 0, "DN pulses");
    check(n_both > 0, "UP&DN reset"); check(n_inc > 0, "integral up");
    check(n_dec > 0, "integral down");
    check(n_p[1] > 0, "retimed 0"); check(n_p[2] > 0, "retimed +1");
    check(n_noisy > 100000, "DCO noise active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
