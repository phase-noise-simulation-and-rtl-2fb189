// tb_retiming_reg: checks that the proportional and integral words reach the
// outputs only on rising FB edges, with the value present just before the
// edge, and that reset clears them.
module tb_retiming_reg;
  timeunit 1ps; timeprecision 1fs;
  logic fb = 0, rst_n = 1;
  logic [1:0] p_in, p_q;
  logic [11:0] i_in, i_q;
  logic [1:0] ep; logic [11:0] ei;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset

  retiming_reg #(.W(12)) dut (.fb, .rst_n, .p_in, .ictl_in(i_in), .p_q, .ictl_q(i_q));

  task automatic check(string what);
    checks++;
    if (p_q !== ep || i_q !== ei) begin
      failures++;
      $display("FAIL %s: %b %h expected %b %h", what, p_q, i_q, ep, ei);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p_in = 2'b10; i_in = 12'h5A5;
    #5; ep = 0; ei = 0; check("reset");
    rst_n = 1; #5;
    for (int k = 0; k < 100; k++) begin
      p_in = 2'($urandom_range(2)); i_in = 12'($urandom);
      #10; check("hold between edges");
      ep = p_in; ei = i_in;
      fb = 1; #1;
      p_in = ~p_in; i_in = ~i_in;   // change after the edge must not pass
      #9; check("captured at edge");
      fb = 0; #10; check("hold after falling edge");
    end
    rst_n = 0; #1; ep = 0; ei = 0; check("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
