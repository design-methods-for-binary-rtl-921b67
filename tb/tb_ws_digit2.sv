// tb_ws_digit2: self-checking testbench for the LUT cascade of decimal
// position 2.
//
// Applies all 65536 input words. For each, the expected position value z
// is recomputed from the decimal digits of the powers of two (tb_ref_pkg);
// the cascade must return the digit z % 10 and the carry z / 10. The
// largest z seen must be 19, the top of the position's range. A watchdog
// ends a stalled run.
module tb_ws_digit2;
  import bin2dec_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int unsigned zmax = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] x;
  bcd_t        digit;
  logic        carry;

  ws_digit2 u_dut (.x(x), .digit(digit), .carry(carry));

  initial begin
    int unsigned z;
    x = '0;
    for (int v = 0; v < 65536; v++) begin
      x = 16'(v);
      @(posedge clk);
      z = ws_ref(2, x);
      if (z > zmax) zmax = z;
      checks++;
      if (int'(digit) != z % 10 || int'(carry) != z / 10) begin
        failures++;
        if (failures <= 10)
          $display("FAIL x=%0d: digit=%0d carry=%0d, expected z=%0d", v, digit, carry, z);
      end
    end
    checks++;
    if (zmax != 19) begin
      failures++;
      $display("FAIL largest position value %0d, expected 19", zmax);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
