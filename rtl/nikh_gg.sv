// nikh_gg: thresholding Nikhilam multiplier for two operands just above the
// base, prod = in1 * in2.
//
// The base is r = 2^(N-1). Both operands must lie in (r, r + 2^TS - 1], so
// their excesses a = in1 - r and b = in2 - r are simply the low TS bits.
// Then in1*in2 = r*(in1 + in2 - r) + a*b = r*(r + a + b) + a*b. Because
// a + b and a*b are short, the three terms occupy separate bit fields and
// the result is a concatenation: bit 2N-2 is the r*r term, a + b (one
// TS-bit carry look-ahead addition) sits from bit N-1 up and a*b (one TS-bit
// Vedic multiplication) fills the low bits. Nothing is checked here: the
// logic block of the integrated multiplier only selects this unit for
// operands in range. Only the low TS bits of each operand are ports, since
// the upper bits are fixed by the range. Needs 2*TS <= N-1. Combinational.
module nikh_gg #(
  parameter int unsigned N  = 128,
  parameter int unsigned TS = N / 4
) (
  input  logic [TS-1:0]  in1,   // low TS bits of the operand above the base
  input  logic [TS-1:0]  in2,   // low TS bits of the other operand above the base
  output logic [2*N-1:0] prod
);
  if (2 * TS > N - 1) begin : g_bad
    $error("nikh_gg: threshold TS too large for N");
  end

  logic [TS-1:0]   a, b, ab_sum;
  logic            ab_c;
  logic [2*TS-1:0] ab;

  assign a = in1;
  assign b = in2;

  cla_adder #(.W(TS)) u_add (.a(a), .b(b), .cin(1'b0), .sum(ab_sum), .cout(ab_c));
  vedic_ut  #(.N(TS)) u_mul (.inp1(a), .inp2(b), .prod(ab));

  assign prod = {2'b01, (N-1)'({ab_c, ab_sum}), (N-1)'(ab)};
endmodule
