// ut_square32: 32-bit Urdhva squarer, sq = inp * inp.
//
// One scaling level (square_stage) around two 16-bit squarers ut_square16
// for the halves and one 16-bit multiplier vedic_ut16 for their cross
// product. Combinational.
module ut_square32 (
  input  logic [31:0]  inp,
  output logic [63:0] sq
);
  logic [15:0] hi, lo;
  logic [31:0] x_sq, y_sq, xprod;

  square_stage #(.H(16)) u_stage (.inp(inp), .hi(hi), .lo(lo),
                                  .x_sq(x_sq), .y_sq(y_sq), .xprod(xprod), .sq(sq));

  ut_square16 u_hi (.inp(hi), .sq(x_sq));
  ut_square16 u_lo (.inp(lo), .sq(y_sq));
  vedic_ut16 u_x  (.inp1(hi), .inp2(lo), .prod(xprod));
endmodule
