// ws_digit0: units position of the 16-bit binary to BCD converter.
//
// The units value of x is z0 = x0 + 2*c, where
//   c = (x1+x5+x9+x13) + 2(x2+x6+x10+x14) + 3(x4+x8+x12) + 4(x3+x7+x11+x15)
// lies in 0..37 (the units digits of 2**i are 1,2,4,8,6,2,4,8,6,...). Since
// 2*c is even, x0 becomes the least-significant bit of the units digit
// directly, and c alone is evaluated by look-up tables:
//   * c is decomposed arithmetically into c = A + B over disjoint inputs:
//       A = x13 + 2(x6+x10+x14) + 3x12 + 4x7          (0..14)
//       B = x1+x5+x9 + 2x2 + 3(x4+x8) + 4x3           (0..15)
//     each a two-cell LUT cascade (3-bit rail for A, 2-bit rail for B);
//   * a 4-bit binary adder forms A + B (0..29);
//   * a last cell adds 4(x11+x15) and returns {c / 5, c % 5}.
// Because the units digit of 2c is 2*(c % 5) and the carry into the tens is
// c / 5, the digit is {c % 5, x0} and the carry (0..7) goes to the tens
// decimal adder.
// Interface: x (16-bit input), digit (BCD units digit), carry (3 bits).
// Purely combinational: two LUT levels, the adder, one LUT level.
//
// The cell boundaries, the input-to-cell assignment, the rail widths and
// the 4-bit adder follow the design, and with them the split of x1..x15
// between the cells. The second A cell gets a 3-bit rail and two inputs, so
// it needs only 5 address bits (128 memory bits).
module ws_digit0
  import bin2dec_pkg::*;
(
  input  logic [N_BIN-1:0] x,
  output bcd_t             digit,
  output logic [2:0]       carry
);

  logic [2:0] a_rail;   // x13 + 2(x6+x10+x14), 0..7
  logic [3:0] a_sum;    // partial sum A, 0..14
  logic [1:0] b_rail;   // x1+x5+x9, 0..3
  logic [3:0] b_sum;    // partial sum B, 0..15
  logic [4:0] ab_sum;   // A + B, 0..29
  logic [5:0] c_split;  // {c / 5, c % 5}

  ws_lut #(.RAIL_W(0), .X_N(4), .OUT_W(3),
           .WEIGHTS({8'd2, 8'd2, 8'd2, 8'd1}))        // x14 x10 x6 x13
    u_a0 (.addr({x[14], x[10], x[6], x[13]}), .dout(a_rail));

  ws_lut #(.RAIL_W(3), .X_N(2), .OUT_W(4),
           .WEIGHTS({8'd4, 8'd3}))                    // x7 x12
    u_a1 (.addr({a_rail, x[7], x[12]}), .dout(a_sum));

  ws_lut #(.RAIL_W(0), .X_N(3), .OUT_W(2),
           .WEIGHTS({8'd1, 8'd1, 8'd1}))              // x9 x5 x1
    u_b0 (.addr({x[9], x[5], x[1]}), .dout(b_rail));

  ws_lut #(.RAIL_W(2), .X_N(4), .OUT_W(4),
           .WEIGHTS({8'd4, 8'd3, 8'd3, 8'd2}))        // x3 x8 x4 x2
    u_b1 (.addr({b_rail, x[3], x[8], x[4], x[2]}), .dout(b_sum));

  bin_adder #(.A_W(4), .B_W(4), .S_W(5))
    u_add (.a(a_sum), .b(b_sum), .s(ab_sum));

  ws_lut #(.RAIL_W(5), .X_N(2), .OUT_W(6),
           .WEIGHTS({8'd4, 8'd4}),                    // x15 x11
           .OUT_MODE(OUT_SPLIT), .MODULUS(5), .LOW_W(3))
    u_c (.addr({ab_sum, x[15], x[11]}), .dout(c_split));

  assign digit = {c_split[2:0], x[0]};
  assign carry = c_split[5:3];

endmodule
