// nikh_ss: thresholding Nikhilam multiplier for two operands just below the
// base, prod = in1 * in2.
//
// The base is r = 2^(N-1). Both operands must lie in [r - 2^TS + 1, r), so
// their deficits a = r - in1 and b = r - in2 are the two's complements of
// the low TS bits (~x + 1, a TS-bit carry look-ahead addition each). Then
// in1*in2 = r*(in1 - b) + a*b: in1 - b is one N-bit subtraction and a*b one
// TS-bit Vedic multiplication, and since a*b < r the result is the
// concatenation {in1 - b, a*b} with a*b in the low N-1 bits. Operands out of
// range give a wrong product; the logic block of the integrated multiplier
// only selects this unit for operands in range. Only the low TS bits of
// in2 are a port; in1 is full width. Needs 2*TS <= N-1.
// Combinational.
module nikh_ss #(
  parameter int unsigned N  = 128,
  parameter int unsigned TS = N / 4
) (
  input  logic [N-1:0]   in1,
  input  logic [TS-1:0]  in2,   // low TS bits of the second operand below the base
  output logic [2*N-1:0] prod
);
  if (2 * TS > N - 1) begin : g_bad
    $error("nikh_ss: threshold TS too large for N");
  end

  logic [TS-1:0]   a, b;
  logic            unused_a_c, unused_b_c, unused_h_c;
  logic [2*TS-1:0] ab;
  logic [N-1:0]    hi;

  // deficits from the base
  cla_adder #(.W(TS)) u_na (.a(~in1[TS-1:0]), .b('0), .cin(1'b1), .sum(a), .cout(unused_a_c));
  cla_adder #(.W(TS)) u_nb (.a(~in2), .b('0), .cin(1'b1), .sum(b), .cout(unused_b_c));
  vedic_ut  #(.N(TS)) u_mul (.inp1(a), .inp2(b), .prod(ab));

  // in1 + in2 - r = in1 - b
  cla_adder #(.W(N)) u_hi (.a(in1), .b(~N'(b)), .cin(1'b1), .sum(hi), .cout(unused_h_c));

  assign prod = {1'b0, hi, (N-1)'(ab)};
endmodule
