// tb_bin2dec16: end-to-end self-checking testbench for the 16-bit binary to
// BCD converter, at its only (default) size.
//
// Applies all 65536 input words in order, one per clock of a testbench
// clock, and checks each output digit y[j] against (x / 10**j) % 10 worked
// out by integer division, plus that every digit is a valid BCD code.
//
// It also counts how often each mechanism of the converter was exercised
// and fails if one never was (worked out from the reference sums of each
// decimal position, so the counts do not depend on the converter's insides):
//   * a carry of 1..7 out of the units cascade into the tens adder,
//   * a carry out of each of the tens, hundreds and thousands cascades,
//   * the decimal carry-out of each of the first three decimal adders,
//   * a full ripple, where all three decimal carries are set at once,
//   * the x0 bit passing straight into the units digit.
// A watchdog ends a stalled run.
module tb_bin2dec16;
  import bin2dec_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_k0 = 0, n_k1 = 0, n_k2 = 0, n_k3 = 0;
  int n_c1 = 0, n_c2 = 0, n_c3 = 0, n_ripple = 0, n_x0 = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N_BIN-1:0] x;
  bcd_t [N_DEC-1:0] y;

  bin2dec16 u_dut (.x(x), .y(y));

  task automatic need(string what, int n);
    checks++;
    $display("%-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int unsigned p, z0, z1, z2, z3, k1, t1, t2, t3;
    bit c1, c2, c3;
    x = '0;
    for (int v = 0; v < 65536; v++) begin
      x = 16'(v);
      @(posedge clk);
      p = 1;
      for (int j = 0; j < N_DEC; j++) begin
        checks++;
        if (int'(y[j]) != (v / p) % 10 || y[j] > 4'd9) begin
          failures++;
          if (failures <= 10)
            $display("FAIL x=%0d: y[%0d]=%0d expected %0d", v, j, y[j], (v / p) % 10);
        end
        p *= 10;
      end
      // Mechanisms, worked out from the reference sums of each position.
      z0 = ws_ref(0, x); z1 = ws_ref(1, x); z2 = ws_ref(2, x);
      z3 = ws_ref(3, x);
      k1 = z1 / 10;
      t1 = z1 % 10 + z0 / 10;                c1 = t1 >= 10;
      t2 = z2 % 10 + k1 + (c1 ? 1 : 0);      c2 = t2 >= 10;
      t3 = z3 % 10 + z2 / 10 + (c2 ? 1 : 0); c3 = t3 >= 10;
      if (z0 / 10 != 0) n_k0++;
      if (k1 != 0) n_k1++;
      if (z2 / 10 != 0) n_k2++;
      if (z3 / 10 != 0) n_k3++;
      if (c1) n_c1++;
      if (c2) n_c2++;
      if (c3) n_c3++;
      if (c1 && c2 && c3) n_ripple++;
      if (x[0] && y[0][0]) n_x0++;
    end
    need("units -> tens cascade carry",        n_k0);
    need("tens -> hundreds cascade carry",     n_k1);
    need("hundreds -> thousands cascade carry", n_k2);
    need("thousands -> 10^4 cascade carry",    n_k3);
    need("decimal carry out of tens adder",    n_c1);
    need("decimal carry out of hundreds adder", n_c2);
    need("decimal carry out of thousands adder", n_c3);
    need("full decimal ripple (3 carries)",    n_ripple);
    need("x0 routed to units digit",           n_x0);
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
