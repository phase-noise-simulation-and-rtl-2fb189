// tb_adpll_top: end-to-end run of the ADPLL without noise (step response).
//
// A clean 24 MHz reference drives the loop with divide ratio 100. The DCO
// starts at its intrinsic 2.2 GHz and must ramp to 2.4 GHz at one 100 kHz
// unit per reference period (about 83 us for 2000 units), overshoot a little
// and settle into lock. Checked:
//   - the start frequency (2.2 GHz) and the ramp rate (2.4 MHz/us +- 10 %);
//   - first crossing of 2.4 GHz between 70 and 110 us, peak below 2.45 GHz;
//   - after 250 us the 1-us frequency averages stay within 2 MHz of 2.4 GHz
//     and the mean over the last 40 us within 20 kHz;
//   - the FB edge stays within 2 ns of the REF edge once locked.
// Counted, and required at least once: UP pulses, DN pulses, UP&DN overlap
// resets, integral increments and decrements, and the retimed proportional
// values +1 and 0 (-1 cannot reach the varactors in closed loop, see below).
module tb_adpll_top;
  timeunit 1ps; timeprecision 1fs;
  localparam real SIM_US = 300.0;
  logic rst_n = 1, ref_clk, out, fb, up, dn;
  logic [1:0] p_q;
  logic [11:0] ictl_q;
  real period, ctrl;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset

  ref_clk_model #(.JITTER_EN(1'b0)) u_ref (.rst_n, .clk(ref_clk));

  adpll_top #(.NOISE_EN(4'b0000)) dut (
    .ref_clk, .rst_n, .div_ratio(8'd100), .out, .fb, .up, .dn, .p_q, .ictl_q,
    .period, .ctrl);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int n_up = 0, n_dn = 0, n_both = 0, n_inc = 0, n_dec = 0;
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

  // frequency per 1-us window from the DCO output edges
  real f_win [$];
  real t_first = -1.0, t_last;
  int edges = 0;
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
  end

  // FB-REF phase error once locked
  real t_ref = 0.0, max_err = 0.0;
  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge fb) if ($realtime > 250.0e6) begin
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
    int t_cross, peak_i;
    real peak, m, slope;
    #100000 rst_n = 1;
    #(SIM_US * 1.0e6 - 100000.0);
    check(f_win.size() > 280, $sformatf("%0d windows", f_win.size()));
    check(f_win[0] > 2.195e9 && f_win[0] < 2.215e9, $sformatf("start %g Hz", f_win[0]));
    slope = (f_win[60] - f_win[20]) / 40.0;
    check(slope > 2.16e6 && slope < 2.64e6, $sformatf("ramp %g Hz/us", slope));
    t_cross = -1; peak = 0; peak_i = 0;
    foreach (f_win[k]) begin
      if (t_cross < 0 && f_win[k] >= 2.4e9) t_cross = k;
      if (f_win[k] > peak) begin peak = f_win[k]; peak_i = k; end
    end
    $display("first 2.4 GHz crossing at %0d us, peak %g Hz at %0d us, FB-REF max %f ps",
             t_cross, peak, peak_i, max_err);
    check(t_cross >= 70 && t_cross <= 110, $sformatf("crossing at %0d us", t_cross));
    check(peak < 2.45e9, "overshoot bounded");
    m = 0;
    for (int k = 250; k < f_win.size(); k++) begin
      check(f_win[k] > 2.398e9 && f_win[k] < 2.402e9, $sformatf("locked window %0d: %g", k, f_win[k]));
      if (k >= f_win.size() - 40) m += f_win[k] / 40.0;
    end
    check(m > 2.39998e9 && m < 2.40002e9, $sformatf("locked mean %f Hz", m));
    check(max_err < 2000.0, $sformatf("FB-REF error %f ps", max_err));
    $display("mechanisms: up %0d dn %0d both %0d inc %0d dec %0d p(-1,0,+1) %0d %0d %0d",
             n_up, n_dn, n_both, n_inc, n_dec, n_p[0], n_p[1], n_p[2]);
    check(n_up > 0, "UP pulses"); check(n_dn > 0, "DN pulses");
    check(n_both > 0, "UP&DN reset"); check(n_inc > 0, "integral up");
    check(n_dec > 0, "integral down");
    // The FB-edge retiming samples the PFD just before FB can set DN, so
    // inside the loop the retimed proportional word is +1 or 0, never -1.
    check(n_p[1] > 0, "retimed 0"); check(n_p[2] > 0, "retimed +1");
    check(n_p[0] == 0, "no retimed -1 in closed loop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
