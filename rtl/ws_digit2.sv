// ws_digit2: hundreds position of the 16-bit binary to BCD converter.
//
// The hundreds value of x (before carries from below) is the weighted sum
//   z2 = (x7+x13) + 2x8 + 3x14 + 5x9 + 7x15           (0..19)
// whose weights are the hundreds digits of 2**i. A two-cell LUT cascade
// evaluates it: the first cell forms x7 + x13 + 2x8 + 3x14 (0..7) on a 3-bit
// rail, the second adds 5x9 + 7x15 and returns {z2 / 10, z2 % 10}, a BCD
// digit and a one-bit carry for the thousands decimal adder.
// Interface: x (16-bit input), digit (BCD), carry (1 bit). Purely
// combinational, two LUT levels.
//
// Cells, input assignment and widths follow the design; no adder is needed
// in this position.
module ws_digit2
  import bin2dec_pkg::*;
(
  input  logic [N_BIN-1:0] x,
  output bcd_t             digit,
  output logic             carry
);

  logic [2:0] rail;     // 0..7
  logic [4:0] z_split;  // {z2 / 10, z2 % 10}

  ws_lut #(.RAIL_W(0), .X_N(4), .OUT_W(3),
           .WEIGHTS({8'd3, 8'd2, 8'd1, 8'd1}))        // x14 x8 x13 x7
    u_0 (.addr({x[14], x[8], x[13], x[7]}), .dout(rail));

  ws_lut #(.RAIL_W(3), .X_N(2), .OUT_W(5),
           .WEIGHTS({8'd7, 8'd5}),                    // x15 x9
           .OUT_MODE(OUT_SPLIT), .MODULUS(10), .LOW_W(4))
    u_1 (.addr({rail, x[15], x[9]}), .dout(z_split));

  assign digit = z_split[3:0];
  assign carry = z_split[4];

endmodule
