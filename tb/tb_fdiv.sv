// tb_fdiv: checks that the divider gives one rising edge every `ratio` input
// clocks, with ceil(ratio/2) high clocks, the first edge floor(ratio/2)
// clocks after reset, for the reference ratio 100 and an odd ratio.
module tb_fdiv;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 1, q;
  logic [7:0] ratio;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset

  fdiv #(.DIV_WIDTH(8)) dut (.clk, .rst_n, .ratio, .div_out(q));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_ratio(int m);
    int n, last_rise, high, first;
    logic prev;
    ratio = 8'(m);
    rst_n = 0;
    repeat (3) @(negedge clk);
    check(q == 0, "low in reset");
    rst_n = 1;
    n = 0; last_rise = -1; high = 0; first = -1; prev = q;
    repeat (6 * m) begin
      @(posedge clk); #1;
      n++;
      if (q && !prev) begin
        if (first < 0) begin
          first = n;
          check(n == m / 2, $sformatf("ratio %0d first edge at %0d", m, n));
        end else begin
          check(n - last_rise == m, $sformatf("ratio %0d period %0d", m, n - last_rise));
        end
        if (last_rise >= 0)
          check(high == (m + 1) / 2, $sformatf("ratio %0d high %0d", m, high));
        last_rise = n;
        high = 0;
      end
      if (q && first >= 0) high++;
      prev = q;
    end
    check(last_rise > 0 && first > 0, $sformatf("ratio %0d produced edges", m));
  endtask

  initial begin
    run_ratio(100);
    run_ratio(7);
    run_ratio(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
