// ut_square64: 64-bit Urdhva squarer, sq = inp * inp.
//
// One scaling level (square_stage) around two 32-bit squarers ut_square32
// for the halves and one 32-bit multiplier vedic_ut32 for their cross
// product. Combinational.
module ut_square64 (
  input  logic [63:0]  inp,
  output logic [127:0] sq
);
  logic [31:0] hi, lo;
  logic [63:0] x_sq, y_sq, xprod;

  square_stage #(.H(32)) u_stage (.inp(inp), .hi(hi), .lo(lo),
                                  .x_sq(x_sq), .y_sq(y_sq), .xprod(xprod), .sq(sq));

  ut_square32 u_hi (.inp(hi), .sq(x_sq));
  ut_square32 u_lo (.inp(lo), .sq(y_sq));
  vedic_ut32 u_x  (.inp1(hi), .inp2(lo), .prod(xprod));
endmodule
