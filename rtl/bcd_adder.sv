// bcd_adder: one decimal (q-nary, q = 10) digit adder of the converter's
// output ripple.
//
// Adds a decimal digit a (0..9, from the LUT cascade of this position), the
// carry b handed over from the position below (a small binary number, 0..7
// in this converter) and a carry-in bit from the decimal adder below. A
// binary sum t = a + b + cin is formed; if t >= 10 the digit is t - 10 and
// cout is 1, otherwise the digit is t and cout is 0. t can be at most 16 here,
// so one correction step suffices (any a, b <= 9 keeps t <= 19).
// Purely combinational.
//
// The design gives the function (a decimal adder with carry in and carry
// out per output digit); the compare-and-subtract-10 circuit is this
// implementation's own choice.
module bcd_adder
  import bin2dec_pkg::*;
(
  input  bcd_t       a,      // digit of this position, 0..9
  input  logic [3:0] b,      // carry from the LUT cascade below, 0..9
  input  logic       cin,    // carry from the decimal adder below
  output bcd_t       sum,    // BCD result digit
  output logic       cout    // decimal carry to the next adder
);

  logic [4:0] t;

  always_comb begin
    t = 5'(a) + 5'(b) + 5'(cin);
    if (t >= 5'd10) begin
      sum  = 4'(t - 5'd10);
      cout = 1'b1;
    end else begin
      sum  = t[3:0];
      cout = 1'b0;
    end
  end

endmodule
