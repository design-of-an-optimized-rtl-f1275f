// karatsuba_stage: the adders and gates of one scaling level of the Vedic
// multiplier, which turn an H-bit multiplier into a 2H-bit one.
//
// It splits inp1 and inp2 into halves AH, AL, BH, BL and hands three
// H-bit operand pairs to three H-bit multipliers outside: (AH, BH) giving X,
// (AL, BL) giving Y, and the low H bits of Z1 = AH + AL and Z2 = BH + BL
// giving T1. From the three products it forms
//   P  = X + Y
//   T2 = (Z1[H-1:0] << H) AND Z2[H], T3 = (Z2[H-1:0] << H) AND Z1[H]
//   TX = T1 + T2, TY = TX[2H-1:0] + T3
//   y  = Z1[H]Z2[H] + TX[2H] + TY[2H]          (one full adder)
//   Z  = {y, TY[2H-1:0]} = Z1*Z2, R = Z + ~P + 1 = AH*BL + AL*BH
//   prod = {X, Y} + (R << H)
// The (H+1)-bit product Z1*Z2 thus needs only an H-bit multiplier, AND
// gates in place of shifts and 2H-bit additions, and the final combination
// is a single 3H-bit addition above the untouched low H bits of Y. This is
// the Karatsuba-Ofman scheme in the form the design gives; every addition is
// a cla_adder. Combinational.
module karatsuba_stage #(
  parameter int unsigned H = 4
) (
  input  logic [2*H-1:0] inp1,
  input  logic [2*H-1:0] inp2,
  // operand pairs for the three H-bit multipliers
  output logic [H-1:0]   hh_a, hh_b,
  output logic [H-1:0]   ll_a, ll_b,
  output logic [H-1:0]   mid_a, mid_b,
  // their products
  input  logic [2*H-1:0] x_hh,
  input  logic [2*H-1:0] y_ll,
  input  logic [2*H-1:0] t1,
  output logic [4*H-1:0] prod
);
  logic [H-1:0]   ah, al, bh, bl, z1, z2;
  logic           z1_c, z2_c;
  logic [2*H-1:0] p_sum, t2, t3, tx, ty;
  logic           p_c, tx_c, ty_c;
  logic           xb;
  logic [1:0]     yb;
  logic [2*H+1:0] z_full, r_mid;
  logic           unused_r_c, unused_top_c;
  logic [3*H-1:0] upper;

  assign ah = inp1[2*H-1:H];
  assign al = inp1[H-1:0];
  assign bh = inp2[2*H-1:H];
  assign bl = inp2[H-1:0];

  cla_adder #(.W(H)) u_z1 (.a(ah), .b(al), .cin(1'b0), .sum(z1), .cout(z1_c));
  cla_adder #(.W(H)) u_z2 (.a(bh), .b(bl), .cin(1'b0), .sum(z2), .cout(z2_c));

  assign hh_a  = ah;
  assign hh_b  = bh;
  assign ll_a  = al;
  assign ll_b  = bl;
  assign mid_a = z1;
  assign mid_b = z2;

  cla_adder #(.W(2*H)) u_p (.a(x_hh), .b(y_ll), .cin(1'b0), .sum(p_sum), .cout(p_c));

  // shifts by H realised as AND gates on the wires
  assign t2 = {z1 & {H{z2_c}}, {H{1'b0}}};
  assign t3 = {z2 & {H{z1_c}}, {H{1'b0}}};
  cla_adder #(.W(2*H)) u_tx (.a(t1), .b(t2), .cin(1'b0), .sum(tx), .cout(tx_c));
  cla_adder #(.W(2*H)) u_ty (.a(tx), .b(t3), .cin(1'b0), .sum(ty), .cout(ty_c));

  // full adder for the top of Z1*Z2
  assign xb = z1_c & z2_c;
  assign yb = {(xb & tx_c) | (xb & ty_c) | (tx_c & ty_c), xb ^ tx_c ^ ty_c};
  assign z_full = {yb, ty};

  // R = Z - P
  cla_adder #(.W(2*H+2)) u_r (.a(z_full), .b(~{1'b0, p_c, p_sum}), .cin(1'b1),
                              .sum(r_mid), .cout(unused_r_c));

  // combiner: {X, Y} + (R << H), one addition above Y's low half
  cla_adder #(.W(3*H)) u_comb (.a({x_hh, y_ll[2*H-1:H]}), .b((3*H)'(r_mid)), .cin(1'b0),
                               .sum(upper), .cout(unused_top_c));
  assign prod = {upper, y_ll[H-1:0]};
endmodule
