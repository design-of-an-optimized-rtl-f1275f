// ut_square8: 8-bit Urdhva squarer, sq = inp * inp.
//
// One scaling level (square_stage) around two 4-bit squarers ut_square4
// for the halves and one 4-bit multiplier vedic_ut4 for their cross
// product. Combinational.
module ut_square8 (
  input  logic [7:0]  inp,
  output logic [15:0] sq
);
  logic [3:0] hi, lo;
  logic [7:0] x_sq, y_sq, xprod;

  square_stage #(.H(4)) u_stage (.inp(inp), .hi(hi), .lo(lo),
                                  .x_sq(x_sq), .y_sq(y_sq), .xprod(xprod), .sq(sq));

  ut_square4 u_hi (.inp(hi), .sq(x_sq));
  ut_square4 u_lo (.inp(lo), .sq(y_sq));
  vedic_ut4 u_x  (.inp1(hi), .inp2(lo), .prod(xprod));
endmodule
