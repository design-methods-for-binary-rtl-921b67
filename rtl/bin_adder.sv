// bin_adder: unsigned binary adder that joins the two halves of an
// arithmetically decomposed weighted-sum function.
//
// A weighted sum WS(x) is split into WS_A(x) + WS_B(x) over disjoint sets
// of inputs; each half is evaluated by its own small LUT cascade and this
// adder adds the two partial sums (decomposition coefficient 1). By default
// the sum is one bit wider than the wider operand, so it never overflows; an
// instance whose operand ranges are known to fit fewer bits sets S_W lower
// and the sum is taken modulo 2**S_W.
// Interface: operands a (A_W bits) and b (B_W bits), sum s. Purely
// combinational, no carry input.
//
// The adder itself follows the design; its operand widths are set by each
// instance from the ranges of the partial sums.
module bin_adder #(
  parameter int unsigned A_W = 4,
  parameter int unsigned B_W = 4,
  parameter int unsigned S_W = ((A_W > B_W) ? A_W : B_W) + 1
) (
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [S_W-1:0] s
);

  assign s = S_W'(a) + S_W'(b);

endmodule
