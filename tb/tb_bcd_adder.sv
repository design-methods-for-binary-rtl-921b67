// tb_bcd_adder: self-checking testbench for the decimal digit adder.
//
// Applies every digit a in 0..9, every carry b in 0..9 and both carry-in
// values, and checks that 10*cout + sum = a + b + cin with sum a valid BCD
// digit. Counts how often the decimal carry-out occurred. A watchdog ends a
// stalled run.
module tb_bcd_adder;
  import bin2dec_pkg::*;
  int checks = 0, failures = 0, carries = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  bcd_t a, sum;  logic [3:0] b;  logic cin, cout;
  bcd_adder u_dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    int t;
    a = '0; b = '0; cin = 1'b0;
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++)
        for (int c = 0; c < 2; c++) begin
          a = 4'(i); b = 4'(j); cin = 1'(c);
          @(posedge clk);
          t = i + j + c;
          checks++;
          if (int'(sum) != t % 10 || int'(cout) != t / 10) begin
            failures++;
            $display("FAIL %0d+%0d+%0d gave cout=%0d sum=%0d", i, j, c, cout, sum);
          end
          if (cout) carries++;
        end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL no decimal carry seen");
    end
    $display("decimal carries: %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
