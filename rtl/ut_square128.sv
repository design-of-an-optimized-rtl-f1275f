// ut_square128: 128-bit Urdhva squarer, sq = inp * inp.
//
// One scaling level (square_stage) around two 64-bit squarers ut_square64
// for the halves and one 64-bit multiplier vedic_ut64 for their cross
// product. Combinational.
module ut_square128 (
  input  logic [127:0]  inp,
  output logic [255:0] sq
);
  logic [63:0] hi, lo;
  logic [127:0] x_sq, y_sq, xprod;

  square_stage #(.H(64)) u_stage (.inp(inp), .hi(hi), .lo(lo),
                                  .x_sq(x_sq), .y_sq(y_sq), .xprod(xprod), .sq(sq));

  ut_square64 u_hi (.inp(hi), .sq(x_sq));
  ut_square64 u_lo (.inp(lo), .sq(y_sq));
  vedic_ut64 u_x  (.inp1(hi), .inp2(lo), .prod(xprod));
endmodule
