// tb_pfd: checks the three-state PFD: UP on reference lead, DN on feedback
// lead, both cleared once the other edge arrives, UP held over a second
// reference edge (frequency detection), and reset.
module tb_pfd;
  timeunit 1ps; timeprecision 1fs;
  logic fref = 0, fdiv = 0, rst_n = 1, up, dn;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset

  pfd dut (.fref, .fdiv, .rst_n, .up, .dn);

  task automatic expect_state(logic eu, logic ed, string what);
    checks++;
    if (up !== eu || dn !== ed) begin
      failures++;
      $display("FAIL %s: up=%b dn=%b expected %b %b", what, up, dn, eu, ed);
    end
  endtask

  task automatic pulse_ref(); fref = 1; #100; fref = 0; #100; endtask
  task automatic pulse_fb();  fdiv = 1; #100; fdiv = 0; #100; endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50; pulse_ref(); expect_state(0, 0, "reset holds");
    rst_n = 1; #50;
    expect_state(0, 0, "idle");
    pulse_ref(); expect_state(1, 0, "ref leads -> up");
    pulse_ref(); expect_state(1, 0, "second ref edge keeps up");
    pulse_fb();  expect_state(0, 0, "fb edge clears");
    pulse_fb();  expect_state(0, 1, "fb leads -> dn");
    pulse_fb();  expect_state(0, 1, "second fb edge keeps dn");
    pulse_ref(); expect_state(0, 0, "ref edge clears");
    fref = 1; fdiv = 1; #10; expect_state(0, 0, "simultaneous edges");
    fref = 0; fdiv = 0; #10;
    pulse_ref(); expect_state(1, 0, "up again");
    rst_n = 0; #10; expect_state(0, 0, "async reset clears");
    rst_n = 1; #10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
