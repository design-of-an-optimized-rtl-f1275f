// ut_square16: 16-bit Urdhva squarer, sq = inp * inp.
//
// One scaling level (square_stage) around two 8-bit squarers ut_square8
// for the halves and one 8-bit multiplier vedic_ut8 for their cross
// product. Combinational.
module ut_square16 (
  input  logic [15:0]  inp,
  output logic [31:0] sq
);
  logic [7:0] hi, lo;
  logic [15:0] x_sq, y_sq, xprod;

  square_stage #(.H(8)) u_stage (.inp(inp), .hi(hi), .lo(lo),
                                  .x_sq(x_sq), .y_sq(y_sq), .xprod(xprod), .sq(sq));

  ut_square8 u_hi (.inp(hi), .sq(x_sq));
  ut_square8 u_lo (.inp(lo), .sq(y_sq));
  vedic_ut8 u_x  (.inp1(hi), .inp2(lo), .prod(xprod));
endmodule
