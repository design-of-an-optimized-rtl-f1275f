// sampoornam_logic: decision logic of the integrated multiplier. It looks at
// the operand values and chooses which multiplication unit computes x*y.
//
// A magnitude comparator (an N-bit carry look-ahead subtraction x - y) orders
// the operands into op_hi >= op_lo. Eight tests then feed an 8:3 priority
// encoder whose output sel is the design code of vedic_pkg:
//   7  x == b                          -> SEL_SHIFT_Y  (y << (N-1))
//   6  y == b                          -> SEL_SHIFT_X  (x << (N-1))
//   5  x == y                          -> SEL_SQUARE
//   4  op_hi above, op_lo below the base -> SEL_NIKH_SG
//   3  both below the base             -> SEL_NIKH_SS
//   2  both above the base             -> SEL_NIKH_GG
//   1  neither operand zero            -> SEL_UT
//   0  x == 0 or y == 0                -> SEL_ZERO
// with base b = 2^(N-1) and threshold Th = 2^TS - 1. "Above" means in
// (b, b + Th], "below" in [b - Th, b). The base tests are XOR-and-NOR on
// the original operands; x == y is the zero test on the difference of the
// magnitude comparator (x + ~y + 1), whose carry out also orders the pair; the range tests are made on op_hi and op_lo. A
// range test needs no adder: v is above the base when bit N-1 is 1, bits
// N-2..TS are 0 and the low TS bits are not all 0; below when bit N-1 is 0,
// bits N-2..TS are 1 and the low TS bits are not all 0. The encoder order,
// the codes and the tests follow the design; making input 1 "neither
// operand zero" instead of a constant 1 (so that the zero code can be
// reached) and the closed outer ends of the ranges are this design's
// choices. Combinational.
module sampoornam_logic
  import vedic_pkg::*;
#(
  parameter int unsigned N  = 128,
  parameter int unsigned TS = N / 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] op_hi,
  output logic [N-1:0] op_lo,
  output design_sel_e  sel
);
  localparam logic [N-1:0] BASE = N'(1) << (N - 1);

  logic [N-1:0] diff;
  logic         x_ge_y;
  logic [7:0]   req;
  logic [2:0]   code;

  // comparator: carry out of x + ~y + 1 is 1 exactly when x >= y
  cla_adder #(.W(N)) u_cmp (.a(x), .b(~y), .cin(1'b1), .sum(diff), .cout(x_ge_y));

  assign op_hi = x_ge_y ? x : y;
  assign op_lo = x_ge_y ? y : x;

  function automatic logic above_base(input logic [N-1:0] v);
    return v[N-1] & ~(|v[N-2:TS]) & (|v[TS-1:0]);
  endfunction

  function automatic logic below_base(input logic [N-1:0] v);
    return ~v[N-1] & (&v[N-2:TS]) & (|v[TS-1:0]);
  endfunction

  logic zero_op;
  assign zero_op = ~(|x) | ~(|y);

  assign req[7] = ~(|(x ^ BASE));
  assign req[6] = ~(|(y ^ BASE));
  assign req[5] = ~(|diff);   // x - y == 0
  assign req[4] = above_base(op_hi) & below_base(op_lo);
  assign req[3] = below_base(op_hi) & below_base(op_lo);
  assign req[2] = above_base(op_hi) & above_base(op_lo);
  assign req[1] = ~zero_op;
  assign req[0] = zero_op;

  priority_encoder8 u_enc (.req(req), .code(code));
  assign sel = design_sel_e'(code);
endmodule
