// tb_dco_noise: checks the four noise terms of the DCO against standard
// deviations worked out by hand from the reference noise levels at
// f0 = 2.2 GHz (values below), over 60000 samples:
//   jitter  edge sigma 1.0730e-13 s; term = first difference -> x sqrt(2)
//   flicker sigma 1.2226e-14 s; first difference of Voss-McCartney pink
//           carries 4/17 of its variance -> x sqrt(4/17)
//   wander  sigma 9.691e-15 s, white
//   saunter sigma 1.9586e-16 s, pink (checked loosely: slow rows barely move)
// and that the terms stay zero until the generators are seeded, and that
// dperiod is their sum.
module tb_dco_noise;
  timeunit 1ps; timeprecision 1fs;
  localparam int N = 60000;
  localparam real SJ = 1.0730e-13, SF = 1.2226e-14, SW = 9.691e-15, SS = 1.9586e-16;
  logic clk = 0, rst_n = 1, active;
  real jit, flk, wnd, sau, dperiod;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset

  dco_noise dut (.clk, .rst_n, .active, .jit, .flk, .wnd, .sau, .dperiod);

  always #200 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit inside_tol(real got, real want, real tol);
    return got > want * (1.0 - tol) && got < want * (1.0 + tol);
  endfunction

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sj2, sf2, sw2, ss2, swm, e;
    int n, seeded_at;
    sj2 = 0; sf2 = 0; sw2 = 0; ss2 = 0; swm = 0;
    #10 rst_n = 1;
    n = 0;
    while (!active) begin
      @(negedge clk); n++;
      if (n < 600) check(jit == 0.0 && wnd == 0.0 && dperiod == 0.0, "quiet while seeding");
    end
    seeded_at = n;
    check(seeded_at >= 624 && seeded_at < 640, $sformatf("active after %0d clocks", seeded_at));
    repeat (4) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      sj2 += jit * jit; sf2 += flk * flk; sw2 += wnd * wnd; ss2 += sau * sau; swm += wnd;
      e = dperiod - (jit + flk + wnd + sau);
      if (k % 1000 == 0) check(e < 1e-24 && e > -1e-24, "dperiod is the sum");
    end
    check(inside_tol($sqrt(sj2 / N), SJ * $sqrt(2.0), 0.05), $sformatf("jitter rms %g", $sqrt(sj2 / N)));
    check(inside_tol($sqrt(sf2 / N), SF * $sqrt(4.0 / 17.0), 0.05), $sformatf("flicker rms %g", $sqrt(sf2 / N)));
    check(inside_tol($sqrt(sw2 / N), SW, 0.05), $sformatf("wander rms %g", $sqrt(sw2 / N)));
    check(swm / N < 3.0 * SW / $sqrt(N) && swm / N > -3.0 * SW / $sqrt(N), "wander mean");
    check($sqrt(ss2 / N) > 0.2 * SS && $sqrt(ss2 / N) < 3.0 * SS, $sformatf("saunter rms %g", $sqrt(ss2 / N)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
