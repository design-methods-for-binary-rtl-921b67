// tb_ws_lut: self-checking testbench for the LUT cell.
//
// Three cells are instantiated: a first cell with no rail and a binary
// output, a middle cell with a rail, and a last cell with a rail and a
// split {sum / 10, sum % 10} output. For every address the testbench
// recomputes the weighted sum from the address bits and compares. A
// watchdog ends the run if it does not finish in time.
module tb_ws_lut;
  import bin2dec_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Cell A: 4 inputs, weights 1,2,2,2, no rail, binary output.
  logic [3:0] addr_a;  logic [2:0] dout_a;
  ws_lut #(.RAIL_W(0), .X_N(4), .OUT_W(3), .WEIGHTS({8'd2, 8'd2, 8'd2, 8'd1}))
    u_a (.addr(addr_a), .dout(dout_a));

  // Cell B: 2-bit rail, 4 inputs, weights 2,3,3,4, binary output.
  logic [5:0] addr_b;  logic [3:0] dout_b;
  ws_lut #(.RAIL_W(2), .X_N(4), .OUT_W(4), .WEIGHTS({8'd4, 8'd3, 8'd3, 8'd2}))
    u_b (.addr(addr_b), .dout(dout_b));

  // Cell C: 5-bit rail, 3 inputs, weights 8,9,9, split by 10.
  logic [7:0] addr_c;  logic [6:0] dout_c;
  ws_lut #(.RAIL_W(5), .X_N(3), .OUT_W(7), .WEIGHTS({8'd9, 8'd9, 8'd8}),
           .OUT_MODE(OUT_SPLIT), .MODULUS(10), .LOW_W(4))
    u_c (.addr(addr_c), .dout(dout_c));

  // Cell D: 5-bit rail, 2 inputs, weights 4,4, split by 5 into 3 low bits.
  logic [6:0] addr_d;  logic [5:0] dout_d;
  ws_lut #(.RAIL_W(5), .X_N(2), .OUT_W(6), .WEIGHTS({8'd4, 8'd4}),
           .OUT_MODE(OUT_SPLIT), .MODULUS(5), .LOW_W(3))
    u_d (.addr(addr_d), .dout(dout_d));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int s;
    addr_a = '0; addr_b = '0; addr_c = '0; addr_d = '0;
    for (int a = 0; a < 256; a++) begin
      addr_a = 4'(a); addr_b = 6'(a); addr_c = 8'(a); addr_d = 7'(a);
      @(posedge clk);
      if (a < 16) begin
        s = a[0] + 2 * (a[1] + a[2] + a[3]);
        check($sformatf("A[%0d]", a), int'(dout_a), s);
      end
      if (a < 64) begin
        s = (a >> 4) + 2 * a[0] + 3 * a[1] + 3 * a[2] + 4 * a[3];
        check($sformatf("B[%0d]", a), int'(dout_b), s);
      end
      s = (a >> 3) + 8 * a[0] + 9 * a[1] + 9 * a[2];
      check($sformatf("C.lo[%0d]", a), int'(dout_c[3:0]), s % 10);
      check($sformatf("C.hi[%0d]", a), int'(dout_c[6:4]), s / 10);
      if (a < 128) begin
        s = (a >> 2) + 4 * a[0] + 4 * a[1];
        check($sformatf("D.lo[%0d]", a), int'(dout_d[2:0]), s % 5);
        check($sformatf("D.hi[%0d]", a), int'(dout_d[5:3]), s / 5);
      end
    end
    // Memory sizes: 2**address_bits * output_bits.
    check("A bits", u_a.MEM_BITS, 48);
    check("B bits", u_b.MEM_BITS, 256);
    check("C bits", u_c.MEM_BITS, 1792);
    check("D bits", u_d.MEM_BITS, 768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
