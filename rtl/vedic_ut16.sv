// vedic_ut16: 16-bit unsigned Vedic multiplier, prod = inp1 * inp2.
//
// One scaling level (karatsuba_stage) around three 8-bit multipliers
// vedic_ut8: AH*BH, AL*BL and the product of the low 8 bits of AH + AL and
// BH + BL. The design builds each size from the one below in this way,
// starting from the 4-bit Urdhva Tiryakbhyam multiplier. Combinational.
module vedic_ut16 (
  input  logic [15:0]  inp1,
  input  logic [15:0]  inp2,
  output logic [31:0] prod
);
  logic [7:0] hh_a, hh_b, ll_a, ll_b, mid_a, mid_b;
  logic [15:0] x_hh, y_ll, t1;

  karatsuba_stage #(.H(8)) u_stage (
    .inp1(inp1), .inp2(inp2),
    .hh_a(hh_a), .hh_b(hh_b), .ll_a(ll_a), .ll_b(ll_b), .mid_a(mid_a), .mid_b(mid_b),
    .x_hh(x_hh), .y_ll(y_ll), .t1(t1), .prod(prod));

  vedic_ut8 u_hh  (.inp1(hh_a),  .inp2(hh_b),  .prod(x_hh));
  vedic_ut8 u_ll  (.inp1(ll_a),  .inp2(ll_b),  .prod(y_ll));
  vedic_ut8 u_mid (.inp1(mid_a), .inp2(mid_b), .prod(t1));
endmodule
