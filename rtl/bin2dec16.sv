// bin2dec16: 16-bit binary to 5-digit BCD converter built from LUT cascades,
// binary adders and decimal adders.
//
// Every power of two is a sum of decimal digits times powers of ten, so the
// value contributed to decimal position j by the input bits is a weighted
// sum z_j = sum_i d_j(2**i) * x_i, where d_j(v) is the j-th decimal digit of
// v. Each z_j is evaluated by a small cascade of look-up tables (a binary
// adder joins two cascades where the weighted sum was split in two), and
// the last table of a position returns z_j as a BCD digit plus the carry
// z_j / 10 (for the units position, see ws_digit0). A ripple of four decimal
// adders then adds each carry to the digit above:
//
//   position   value before carries               cascade    decimal adder
//   units      x0 + 2*(0..37)                     ws_digit0  (none, y0)
//   tens       0..56                              ws_digit1  + units carry
//   hundreds   0..19                              ws_digit2  + tens carry
//   thousands  0..23                              ws_digit3  + hundreds carry
//   10**4      0..4                               ws_digit4  + thousands carry
//
// Each decimal adder also takes the one-bit carry-out of the adder below,
// so y = 10**4 y4 + 10**3 y3 + 10**2 y2 + 10 y1 + y0 = x exactly, every y_j a
// BCD digit. y4 is at most 6, so its most significant bit is tied to 0 and
// the carry-out and the upper sum bit of the last adder are unused.
//
// Interface: x (16-bit unsigned binary), y (five BCD digits, y[0] units).
// Purely combinational: the longest path is two LUT levels, a binary
// adder, one LUT level and the four-adder decimal ripple.
//
// The structure (which inputs enter which cell, the rail widths, three
// binary adders and four decimal adders) follows the design; cell contents
// are computed from the weights at elaboration time.
module bin2dec16
  import bin2dec_pkg::*;
(
  input  logic [N_BIN-1:0]       x,
  output bcd_t [N_DEC-1:0]       y
);

  bcd_t       d0, d1, d2, d3;     // digits from the cascades
  logic [2:0] z4;                 // ten-thousands value before carries
  logic [2:0] k0;                 // units -> tens carry, 0..7
  logic [2:0] k1;                 // tens -> hundreds carry, 0..5
  logic       k2;                 // hundreds -> thousands carry, 0..1
  logic [1:0] k3;                 // thousands -> 10**4 carry, 0..2
  logic       c1, c2, c3, c4;     // decimal adder carry chain
  bcd_t       s4;

  ws_digit0 u_z0 (.x(x), .digit(d0), .carry(k0));
  ws_digit1 u_z1 (.x(x), .digit(d1), .carry(k1));
  ws_digit2 u_z2 (.x(x), .digit(d2), .carry(k2));
  ws_digit3 u_z3 (.x(x), .digit(d3), .carry(k3));
  ws_digit4 u_z4 (.x_hi(x[15:14]), .value(z4));

  assign y[0] = d0;

  bcd_adder u_dadd1 (.a(d1), .b({1'b0, k0}), .cin(1'b0),
                     .sum(y[1]), .cout(c1));
  bcd_adder u_dadd2 (.a(d2), .b({1'b0, k1}), .cin(c1),
                     .sum(y[2]), .cout(c2));
  bcd_adder u_dadd3 (.a(d3), .b({3'b000, k2}), .cin(c2),
                     .sum(y[3]), .cout(c3));
  bcd_adder u_dadd4 (.a({1'b0, z4}), .b({2'b00, k3}), .cin(c3),
                     .sum(s4), .cout(c4));

  assign y[4] = {1'b0, s4[2:0]};

endmodule
