// tb_box_muller: checks the transform on hand-computed pairs
// (u1 = 1/2 gives r = sqrt(2 ln 2) = 1.1774100225; u2 = 0 and 1/4 give the
// angles 0 and pi/2), the z0/z1 ordering, and the mean and variance of 20000
// samples from uniform words (|mean| < 0.03, |var-1| < 0.05).
module tb_box_muller;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 1, en = 0;
  logic [31:0] u;
  real z, s1, s2, m, v;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  localparam real R_HALF = 1.1774100225154747;

  box_muller dut (.clk, .rst_n, .en, .u, .z);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (z=%f)", what, z); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1e-6) && (b - a < 1e-6);
  endfunction

  task automatic push(logic [31:0] w);
    en = 1; u = w; @(negedge clk); en = 0;
  endtask

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(near(z, 0.0), "zero after reset");
    push(32'h7FFF_FFFF); check(near(z, 0.0), "no sample before first pair");
    push(32'h0000_0000); check(near(z, R_HALF), "z0 = r cos 0");
    @(negedge clk);      check(near(z, R_HALF), "holds while idle");
    push(32'h7FFF_FFFF); check(near(z, 0.0), "z1 = r sin 0");
    push(32'h4000_0000); check(near(z, 0.0), "z0 = r cos pi/2");
    push(32'hFFFF_FFFF); check(near(z, R_HALF), "z1 = r sin pi/2");
    push(32'hC000_0000); check(near(z, 0.0), "z0 = r' cos 3pi/2, u1 = 1");
    s1 = 0; s2 = 0;
    for (int k = 0; k < 20000; k++) begin
      push($urandom);
      s1 += z; s2 += z * z;
    end
    m = s1 / 20000.0; v = s2 / 20000.0 - m * m;
    check(m < 0.03 && m > -0.03, $sformatf("mean %f", m));
    check(v < 1.05 && v > 0.95, $sformatf("variance %f", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
