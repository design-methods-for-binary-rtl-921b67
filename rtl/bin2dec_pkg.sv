// bin2dec_pkg: types and constants shared by the 16-bit binary to BCD
// converter and its look-up-table cells.
//
// The converter turns a 16-bit unsigned binary number (0..65535) into five
// binary-coded-decimal digits y4..y0. Each digit position is first computed
// as a weighted sum of the input bits (the weight of bit i in decimal
// position j is the j-th decimal digit of 2**i), then the per-position sums
// are normalised by a ripple of decimal adders. The weights below are those
// decimal digits; they are what the look-up tables of the cascades store.
package bin2dec_pkg;

  // Input width (binary digits) and output width (decimal digits).
  localparam int unsigned N_BIN = 16;
  localparam int unsigned N_DEC = 5;

  // Width of one weight field in the packed weight vectors of ws_lut.
  localparam int unsigned WEIGHT_W = 8;

  // One BCD digit, codes 4'b1010..4'b1111 unused.
  typedef logic [3:0] bcd_t;

  // Output encodings a look-up-table cell can store.
  //   OUT_BINARY : the weighted sum itself, as a plain binary number
  //   OUT_SPLIT  : {sum / MODULUS, sum % MODULUS}, the low field LOW_W wide;
  //                with MODULUS = 10 this is a BCD digit plus a decimal carry
  typedef enum logic [0:0] {OUT_BINARY = 1'b0, OUT_SPLIT = 1'b1} lut_out_e;

endpackage
