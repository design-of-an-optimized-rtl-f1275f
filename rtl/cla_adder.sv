// cla_adder: W-bit carry look-ahead adder, {cout, sum} = a + b + cin.
//
// Every addition and subtraction in the multipliers goes through this adder
// (subtraction as a + ~b + 1). Each bit position works as a partial full
// adder: it forms its generate g = a.b and propagate p = a ^ b, and its sum
// bit p ^ c once the look-ahead network has delivered its carry c. The
// network computes every carry from g, p and cin without any carry rippling
// through a full adder: in step s (span d = 1, 2, 4, ...) each position
// merges the (generate, propagate) pair of the d bits below its own span,
//   G[i] = G[i] | P[i].G[i-d],  P[i] = P[i].P[i-d],
// so after two steps the top bit of every 4-bit group holds that group's
// generate GG and propagate PG, after four steps the top bit of every
// 16-bit group holds those of the 16-bit group, and after log2(W) steps the
// carry into every bit is c[i+1] = G[i] | P[i].cin. The delay grows with
// log W. The bit equations and the group generate/propagate terms are those
// of the classic carry look-ahead adder; arranging the look-ahead as a
// parallel-prefix network of whole-word operations, rather than a tree of
// separate 4-bit look-ahead units, is this design's own choice.
// Combinational.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned STEPS = (W < 2) ? 0 : $clog2(W);

  logic [W-1:0] g, p;     // bit generate and propagate
  logic [W-1:0] gs, ps;   // generate and propagate of the span ending at each bit
  logic [W:0]   c;        // carries; c[0] = cin

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    gs = g;
    ps = p;
    for (int unsigned s = 0; s < STEPS; s++) begin
      // the lowest d bits have no span below them: keep their propagate
      gs = gs | (ps & (gs << (1 << s)));
      ps = ps & ((ps << (1 << s)) | ~({W{1'b1}} << (1 << s)));
    end
  end

  assign c    = {gs | (ps & {W{cin}}), cin};
  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
