// ws_digit3: thousands position of the 16-bit binary to BCD converter.
//
// The thousands value of x (before carries from below) is the weighted sum
//   z3 = x10 + 2(x11+x15) + 4x12 + 6x14 + 8x13        (0..23)
// whose weights are the thousands digits of 2**i. It is decomposed as
//   A = x10 + 4x12 + 2x15                 (0..7, one 3-input cell)
//   B = 6x14 + 2x11 = 2 * (3x14 + x11)    (0..8)
// The B cell stores only 3x14 + x11 (0..4, 3 bits); a constant 0 appended
// below its output doubles it. A 4-bit binary adder forms A + B (0..15)
// and a last cell adds 8x13 and returns {z3 / 10, z3 % 10}, a BCD digit and
// a carry of 0..2 for the ten-thousands decimal adder.
// Interface: x (16-bit input), digit (BCD), carry (2 bits). Purely
// combinational.
//
// Cells, input assignment, the 4-bit adder and the last cell follow the
// design. Storing B halved, with the zero bit appended, is this
// implementation's reading of how 6x14 + 2x11 (up to 8) fits a 3-bit cell.
module ws_digit3
  import bin2dec_pkg::*;
(
  input  logic [N_BIN-1:0] x,
  output bcd_t             digit,
  output logic [1:0]       carry
);

  logic [2:0] a_sum;    // 0..7
  logic [2:0] b_half;   // 3x14 + x11, 0..4
  logic [3:0] ab_sum;   // 0..15
  logic [5:0] z_split;  // {z3 / 10, z3 % 10}

  ws_lut #(.RAIL_W(0), .X_N(3), .OUT_W(3),
           .WEIGHTS({8'd2, 8'd4, 8'd1}))              // x15 x12 x10
    u_a (.addr({x[15], x[12], x[10]}), .dout(a_sum));

  ws_lut #(.RAIL_W(0), .X_N(2), .OUT_W(3),
           .WEIGHTS({8'd1, 8'd3}))                    // x11 x14
    u_b (.addr({x[11], x[14]}), .dout(b_half));

  // A + 2 * b_half never exceeds 15, so a 4-bit sum is exact.
  bin_adder #(.A_W(3), .B_W(4), .S_W(4))
    u_add (.a(a_sum), .b({b_half, 1'b0}), .s(ab_sum));

  ws_lut #(.RAIL_W(4), .X_N(1), .OUT_W(6),
           .WEIGHTS(8'd8),                            // x13
           .OUT_MODE(OUT_SPLIT), .MODULUS(10), .LOW_W(4))
    u_c (.addr({ab_sum, x[13]}), .dout(z_split));

  assign digit = z_split[3:0];
  assign carry = z_split[5:4];

endmodule
