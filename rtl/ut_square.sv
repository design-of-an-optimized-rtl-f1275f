// ut_square: N-bit Urdhva squarer, sq = inp * inp, for N in 2, 4, 8, 16,
// 32, 64 and 128.
//
// Squaring is cheaper than general multiplication: in the Urdhva steps each
// crosswise pair collapses to a doubled product, a wire shift (ut_square2,
// ut_square4), and a 2n-bit squarer needs only two n-bit squarers, one
// n-bit multiplier and one addition (square_stage), against three
// multipliers and six additions for a 2n-bit multiplier. This wrapper picks
// the module of the requested size. Combinational.
module ut_square #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0]   inp,
  output logic [2*N-1:0] sq
);
  if (N == 2) begin : g_2
    ut_square2 u_sq (.inp(inp), .sq(sq));
  end else if (N == 4) begin : g_4
    ut_square4 u_sq (.inp(inp), .sq(sq));
  end else if (N == 8) begin : g_8
    ut_square8 u_sq (.inp(inp), .sq(sq));
  end else if (N == 16) begin : g_16
    ut_square16 u_sq (.inp(inp), .sq(sq));
  end else if (N == 32) begin : g_32
    ut_square32 u_sq (.inp(inp), .sq(sq));
  end else if (N == 64) begin : g_64
    ut_square64 u_sq (.inp(inp), .sq(sq));
  end else if (N == 128) begin : g_128
    ut_square128 u_sq (.inp(inp), .sq(sq));
  end else begin : g_bad
    $error("ut_square: N must be 2, 4, 8, 16, 32, 64 or 128");
  end
endmodule
