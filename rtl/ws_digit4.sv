// ws_digit4: ten-thousands position of the 16-bit binary to BCD converter.
//
// Only 2**14 = 16384 and 2**15 = 32768 reach the ten-thousands position,
// so its value before carries is z4 = x14 + 3x15 (0..4). One two-input
// LUT cell with a 3-bit output stores it. Its output feeds the most
// significant decimal adder directly, as a binary number that is also a
// valid BCD digit.
// Interface: x_hi = {x15, x14}, value (3 bits, 0..4).
// Purely combinational, one LUT level.
//
// Follows the design.
module ws_digit4
  import bin2dec_pkg::*;
(
  input  logic [1:0] x_hi,   // {x15, x14}
  output logic [2:0] value
);

  ws_lut #(.RAIL_W(0), .X_N(2), .OUT_W(3),
           .WEIGHTS({8'd3, 8'd1}))                    // x15 x14
    u_0 (.addr(x_hi), .dout(value));

endmodule
