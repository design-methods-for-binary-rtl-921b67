// ws_lut: one memory cell of a look-up-table (LUT) cascade that evaluates a
// weighted-sum (WS) function.
//
// The cell's address is {rail, x}. `rail` (RAIL_W bits, RAIL_W may be 0) is
// the partial sum handed on by the previous cell of the cascade; `x` (X_N
// bits) are the primary input bits that enter at this cell. The cell stores,
// for every address, s = rail + sum_i WEIGHTS[i] * x[i] and returns it either
// as a binary number (OUT_BINARY) or split as {s / MODULUS, s % MODULUS}
// with the remainder in the low LOW_W bits (OUT_SPLIT). The memory therefore
// has 2**(RAIL_W + X_N) words of OUT_W bits.
//
// The contents are computed at elaboration time from the weights, so the
// same module serves every cell of the converter; the cells are read-only
// memories with an asynchronous read, i.e. purely combinational.
//
// Following the design: each cell is a memory holding a WS function of its
// inputs, the cascade rail carries the partial sum in binary, and the last
// cell of a digit position delivers a decimal digit and the carry into the
// next position. Own choices: the packed weight vector (WEIGHT_W bits per
// weight, weight i in bits [i*WEIGHT_W +: WEIGHT_W]), the MODULUS/LOW_W split
// that also covers the modulo-5 output of the least-significant position,
// and the checks that OUT_W can hold every stored value.
module ws_lut
  import bin2dec_pkg::*;
#(
  parameter int unsigned RAIL_W  = 0,                 // cascade (rail) input bits
  parameter int unsigned X_N     = 3,                 // primary input bits
  parameter int unsigned OUT_W   = 2,                 // output bits
  parameter logic [X_N*WEIGHT_W-1:0] WEIGHTS = {X_N{8'd1}},
  parameter lut_out_e    OUT_MODE = OUT_BINARY,
  parameter int unsigned MODULUS = 10,                // OUT_SPLIT only
  parameter int unsigned LOW_W   = 4                  // OUT_SPLIT only
) (
  input  logic [RAIL_W+X_N-1:0] addr,   // {rail, x}
  output logic [OUT_W-1:0]      dout
);

  localparam int unsigned A_W   = RAIL_W + X_N;
  localparam int unsigned DEPTH = 2 ** A_W;

  // Stored value for one address.
  function automatic int unsigned cell_value(int unsigned a);
    int unsigned s;
    s = a >> X_N;                                   // rail value
    for (int unsigned i = 0; i < X_N; i++)
      if (a[i]) s += int'(WEIGHTS[i*WEIGHT_W +: WEIGHT_W]);
    if (OUT_MODE == OUT_SPLIT)
      return ((s / MODULUS) << LOW_W) | (s % MODULUS);
    return s;
  endfunction

  // Largest stored value, to check that OUT_W is wide enough.
  function automatic int unsigned max_value();
    int unsigned m = 0;
    for (int unsigned a = 0; a < DEPTH; a++)
      if (cell_value(a) > m) m = cell_value(a);
    return m;
  endfunction

  // Whole memory image, word a in bits [a*OUT_W +: OUT_W].
  function automatic logic [DEPTH*OUT_W-1:0] rom_image();
    logic [DEPTH*OUT_W-1:0] img = '0;
    for (int unsigned a = 0; a < DEPTH; a++)
      img[a*OUT_W +: OUT_W] = OUT_W'(cell_value(a));
    return img;
  endfunction

  localparam logic [DEPTH*OUT_W-1:0] ROM = rom_image();

  // Number of memory bits of this cell.
  localparam int unsigned MEM_BITS = DEPTH * OUT_W;

  if (64'(max_value()) >= (64'd1 << OUT_W)) begin : gen_chk_out_w
    $error("ws_lut: OUT_W=%0d cannot hold the largest stored value %0d",
           OUT_W, max_value());
  end
  if (OUT_MODE == OUT_SPLIT && 64'(MODULUS) > (64'd1 << LOW_W)) begin : gen_chk_low_w
    $error("ws_lut: LOW_W=%0d too narrow for MODULUS=%0d", LOW_W, MODULUS);
  end

  assign dout = ROM[addr*OUT_W +: OUT_W];

endmodule
