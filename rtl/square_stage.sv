// square_stage: the adder of one scaling level of the Urdhva squarer, which
// turns H-bit squarers into a 2H-bit one.
//
// It splits inp into halves AH and AL, which go to two H-bit squarers
// (X = AH^2, Y = AL^2) and to one H-bit multiplier (AH*AL) outside, and
// combines their results as
//   Z = 2*(AH*AL)                (a one-bit wire shift)
//   sq = {X, Y} + (Z << H)
// which is one 3H-bit carry look-ahead addition above the low H bits of Y.
// Combinational.
module square_stage #(
  parameter int unsigned H = 4
) (
  input  logic [2*H-1:0] inp,
  output logic [H-1:0]   hi,
  output logic [H-1:0]   lo,
  input  logic [2*H-1:0] x_sq,
  input  logic [2*H-1:0] y_sq,
  input  logic [2*H-1:0] xprod,
  output logic [4*H-1:0] sq
);
  logic [3*H-1:0] upper;
  logic           unused_cout;

  assign hi = inp[2*H-1:H];
  assign lo = inp[H-1:0];

  cla_adder #(.W(3*H)) u_comb (.a({x_sq, y_sq[2*H-1:H]}), .b((3*H)'({xprod, 1'b0})),
                               .cin(1'b0), .sum(upper), .cout(unused_cout));
  assign sq = {upper, y_sq[H-1:0]};
endmodule
