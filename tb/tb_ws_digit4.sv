// tb_ws_digit4: self-checking testbench for the ten-thousands LUT cell.
//
// Applies the four combinations of x15, x14 and checks the value
// x14 + 3*x15 against the ten-thousands digits of 2**14 and 2**15
// (tb_ref_pkg). A watchdog ends a stalled run.
module tb_ws_digit4;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] x_hi;
  logic [2:0] value;

  ws_digit4 u_dut (.x_hi(x_hi), .value(value));

  initial begin
    x_hi = '0;
    for (int v = 0; v < 4; v++) begin
      x_hi = 2'(v);
      @(posedge clk);
      checks++;
      if (int'(value) != ws_ref(4, {x_hi, 14'd0})) begin
        failures++;
        $display("FAIL x15,x14=%0b: value=%0d expected %0d", x_hi, value,
                 ws_ref(4, {x_hi, 14'd0}));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
