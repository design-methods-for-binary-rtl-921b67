// ws_digit1: tens position of the 16-bit binary to BCD converter.
//
// The tens value of x (before carries from the units) is the weighted sum
//   z1 = (x4+x9) + 2(x7+x10) + 3x5 + 4x11 + 5x8 + 6(x6+x15) + 8x14
//        + 9(x12+x13)                                    (0..56)
// whose weights are the tens digits of 2**i. It is decomposed as
//   P = 6x6 + 4x11 + 3x5 + 2x7                    (0..15, one 4-input cell)
//   Q = 6x15 + 5x8 + 2x10 + x9 + x4               (0..15, one 5-input cell)
// added by a 4-bit binary adder (0..30); a last cell adds
// 8x14 + 9(x12+x13) and returns {z1 / 10, z1 % 10}: a BCD digit and a
// carry of 0..5 for the hundreds decimal adder.
// Interface: x (16-bit input), digit (BCD, not yet corrected for the carry
// from the units), carry (3 bits). Purely combinational.
//
// Cells, input assignment, widths and the adder follow the design.
module ws_digit1
  import bin2dec_pkg::*;
(
  input  logic [N_BIN-1:0] x,
  output bcd_t             digit,
  output logic [2:0]       carry
);

  logic [3:0] p_sum;    // 0..15
  logic [3:0] q_sum;    // 0..15
  logic [4:0] pq_sum;   // 0..30
  logic [6:0] z_split;  // {z1 / 10, z1 % 10}

  ws_lut #(.RAIL_W(0), .X_N(4), .OUT_W(4),
           .WEIGHTS({8'd2, 8'd3, 8'd4, 8'd6}))        // x7 x5 x11 x6
    u_p (.addr({x[7], x[5], x[11], x[6]}), .dout(p_sum));

  ws_lut #(.RAIL_W(0), .X_N(5), .OUT_W(4),
           .WEIGHTS({8'd1, 8'd1, 8'd2, 8'd5, 8'd6}))  // x4 x9 x10 x8 x15
    u_q (.addr({x[4], x[9], x[10], x[8], x[15]}), .dout(q_sum));

  bin_adder #(.A_W(4), .B_W(4), .S_W(5))
    u_add (.a(p_sum), .b(q_sum), .s(pq_sum));

  ws_lut #(.RAIL_W(5), .X_N(3), .OUT_W(7),
           .WEIGHTS({8'd9, 8'd9, 8'd8}),              // x13 x12 x14
           .OUT_MODE(OUT_SPLIT), .MODULUS(10), .LOW_W(4))
    u_r (.addr({pq_sum, x[13], x[12], x[14]}), .dout(z_split));

  assign digit = z_split[3:0];
  assign carry = z_split[6:4];

endmodule
