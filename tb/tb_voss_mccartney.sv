// tb_voss_mccartney: checks the pink generator against a reference model
// that recomputes the whole sum every sample (rows plus the white term), and
// that row k is replaced exactly every 2^(k+1) samples. A spectral check
// compares the variance of the pink output with that of its first difference
// (for 1/f noise the difference carries far less power than the signal).
module tb_voss_mccartney;
  timeunit 1ps; timeprecision 1fs;
  localparam int ROWS = 16;
  localparam int OW = 16 + $clog2(ROWS + 2);
  logic clk = 0, rst_n = 1, en = 0;
  logic [31:0] rnd;
  logic signed [OW-1:0] pink;
  int checks = 0, failures = 0;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  int rows [ROWS];
  int unsigned cnt = 0;
  int upd_count [ROWS];
  longint expected;
  real s1 = 0, s2 = 0, d2 = 0, prev = 0, vp, vd;

  voss_mccartney #(.ROWS(ROWS), .IN_W(16)) dut (.clk, .rst_n, .en, .rnd, .pink);

  always #5 clk = ~clk;

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (rows[k]) begin rows[k] = 0; upd_count[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= 70000; n++) begin
      en = ($urandom_range(7) != 0);
      rnd = $urandom;
      @(negedge clk);
      if (en) begin
        cnt = (cnt + 1) % (1 << ROWS);
        if (cnt != 0) begin
          int tz;
          tz = 0;
          while (((cnt >> tz) & 1) == 0) tz++;
          rows[tz] = int'($signed(rnd[31:16]));
          upd_count[tz]++;
        end
        expected = longint'($signed(rnd[15:0]));
        foreach (rows[k]) expected += rows[k];
        checks++;
        if (longint'(pink) != expected) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: %0d expected %0d cnt=%0d r=%h rows0-3 %0d %0d %0d %0d", n, pink, expected, cnt, rnd, rows[0], rows[1], rows[2], rows[3]);
        end
        if (n > 40000) begin
          s1 += real'(pink); s2 += real'(pink) * real'(pink);
          d2 += (real'(pink) - prev) * (real'(pink) - prev);
        end
        prev = real'(pink);
      end
    end
    // schedule: row k replaced about cnt / 2^(k+1) times
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (upd_count[k] != (cnt + (1 << k)) >> (k + 1)) begin
        failures++;
        $display("FAIL row %0d replaced %0d times in %0d samples", k, upd_count[k], cnt);
      end
    end
    vp = s2 / 30000.0 - (s1 / 30000.0) * (s1 / 30000.0);
    vd = d2 / 30000.0;
    checks++;
    if (!(vd < vp)) begin failures++; $display("FAIL not low-pass: var %g diff var %g", vp, vd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
