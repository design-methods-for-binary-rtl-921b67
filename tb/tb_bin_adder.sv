// tb_bin_adder: self-checking testbench for the binary adder.
//
// Exhaustively adds all pairs of 4-bit operands with the default (5-bit)
// sum, and all pairs of a 3-bit and a 4-bit operand with a 4-bit sum as
// used in the thousands position, comparing with integer addition (modulo
// 16 for the narrow instance). A watchdog ends a stalled run.
module tb_bin_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a, b;  logic [4:0] s;
  bin_adder #(.A_W(4), .B_W(4)) u_wide (.a(a), .b(b), .s(s));

  logic [2:0] a3;  logic [3:0] s4;
  bin_adder #(.A_W(3), .B_W(4), .S_W(4)) u_narrow (.a(a3), .b(b), .s(s4));

  initial begin
    a = '0; b = '0; a3 = '0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j); a3 = 3'(i);
        @(posedge clk);
        checks++;
        if (int'(s) != i + j) begin
          failures++;
          $display("FAIL %0d+%0d gave %0d", i, j, s);
        end
        checks++;
        if (int'(s4) != ((i % 8) + j) % 16) begin
          failures++;
          $display("FAIL narrow %0d+%0d gave %0d", i % 8, j, s4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
