// tb_mt19937: checks the generator against the published MT19937 sequence
// for seed 5489 (first ten outputs and the 10000th, 4123659995), the seeding
// time (624 clocks) and the rate (one word per clock while en is high, none
// while it is low).
module tb_mt19937;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 1, en = 0, ready, valid;
  logic [31:0] rnd;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  int unsigned ref10 [10] = '{32'd3499211612, 32'd581869302, 32'd3890346734,
                              32'd3586334585, 32'd545404204, 32'd4161255391,
                              32'd3922919429, 32'd949333985, 32'd2715962298,
                              32'd1323567403};

  mt19937 dut (.clk, .rst_n, .seed(32'd5489), .en, .ready, .valid, .rnd);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    check(cyc == 624, $sformatf("seeding took %0d clocks", cyc));
    // ten words back to back
    en = 1;
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      check(valid, "valid every clock");
      check(rnd == ref10[k], $sformatf("word %0d = %0d expected %0d", k + 1, rnd, ref10[k]));
    end
    // a pause must not advance the sequence
    en = 0;
    repeat (5) begin @(negedge clk); check(!valid, "no word while idle"); end
    en = 1;
    n = 10;
    while (n < 10000) begin
      @(negedge clk);
      if (valid) n++;
      if (n == 9000) begin en = 0; @(negedge clk); en = 1; end
    end
    check(rnd == 32'd4123659995, $sformatf("word 10000 = %0d", rnd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
