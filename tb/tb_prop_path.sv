// tb_prop_path: checks the proportional path against its truth table
// (UP DN -> P[1] P[0]: 00->01, 01->00, 10->10, 11->01), i.e. P-1 = 0,-1,+1,0.
module tb_prop_path;
  timeunit 1ps; timeprecision 1fs;
  logic up, dn;
  logic [1:0] p;
  int checks = 0, failures = 0;
  logic [1:0] table_p [4] = '{2'b01, 2'b00, 2'b10, 2'b01};
  int         table_v [4] = '{0, -1, 1, 0};

  prop_path dut (.up, .dn, .p);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      {up, dn} = 2'(k);
      #10;
      checks += 2;
      if (p !== table_p[k]) begin failures++; $display("FAIL %b%b p=%b", up, dn, p); end
      if (int'(p) - 1 != table_v[k]) begin failures++; $display("FAIL value %b%b", up, dn); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
