// tb_int_unary_shreg: checks the integral-path thermometer shift register (L=8): the code must be 2**k-1 for the expected count k, saturating at 0 and 8.
// A reference count is kept independently and compared after every event.
module tb_int_unary_shreg;
  timeunit 1ps; timeprecision 1fs;
  logic up = 0, dn = 0, rst_n = 1;
  logic [8-1:0] q;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  int model = 0;
  int n_up = 0, n_dn = 0, n_sat = 0;

  int_unary_shreg #(.L(8)) dut (.up, .dn, .rst_n, .therm(q));

  task automatic check(string what);
    checks++;
    if (q !== (8'((1 << model) - 1))) begin
      failures++;
      $display("FAIL %s: got %b, expected count %0d", what, q, model);
    end
  endtask

  // one PFD cycle: 0 = UP alone, 1 = DN alone, 2 = UP then DN (overlap),
  // 3 = DN then UP, 4 = both rise together
  task automatic pfd_event(int kind);
    case (kind)
      0: begin up = 1; #10; up = 0; #10; end
      1: begin dn = 1; #10; dn = 0; #10; end
      2: begin up = 1; #10; dn = 1; #1; up = 0; dn = 0; #10; end
      3: begin dn = 1; #10; up = 1; #1; up = 0; dn = 0; #10; end
      default: begin {up, dn} = 2'b11; #1; {up, dn} = 2'b00; #10; end
    endcase
    if (kind == 0 || kind == 2) begin
      if (model < 8) model++; else n_sat++;
      n_up++;
    end else if (kind == 1 || kind == 3) begin
      if (model > 0) model--; else n_sat++;
      n_dn++;
    end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5; check("reset value");
    rst_n = 1; #5;
    for (int k = 0; k < 20; k++) begin pfd_event(0); check("ramp up"); end
    for (int k = 0; k < 25; k++) begin pfd_event(1); check("ramp down"); end
    for (int k = 0; k < 400; k++) begin
      pfd_event($urandom_range(4));
      check("random");
    end
    rst_n = 0; #5; model = 0; check("async reset");
    checks++;
    if (n_sat == 0 || n_up == 0 || n_dn == 0) begin
      failures++; $display("FAIL coverage up=%0d dn=%0d sat=%0d", n_up, n_dn, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
