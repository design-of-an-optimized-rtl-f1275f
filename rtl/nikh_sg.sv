// nikh_sg: thresholding Nikhilam multiplier for one operand above and one
// below the base, prod = in1 * in2.
//
// The base is r = 2^(N-1). in1 must lie in (r, r + 2^TS - 1] and in2 in
// [r - 2^TS + 1, r). The excess of in1 is a = in1 - r, its low TS bits; the
// deficit of in2 is q = r - in2, the two's complement of its low TS bits.
// Then in1*in2 = r*(in1 + in2 - r) - a*q, where in1 + in2 - r = in2 + a is
// one N-bit addition and a*q one TS-bit Vedic multiplication; the shifted
// sum minus a*q is one 2N-bit carry look-ahead subtraction. Operands out of
// range give a wrong product. Only the low TS bits of in1 are a port; in2
// is full width. Needs 2*TS <= N-1. Combinational.
module nikh_sg #(
  parameter int unsigned N  = 128,
  parameter int unsigned TS = N / 4
) (
  input  logic [TS-1:0]  in1,   // low TS bits of the operand above the base
  input  logic [N-1:0]   in2,
  output logic [2*N-1:0] prod
);
  if (2 * TS > N - 1) begin : g_bad
    $error("nikh_sg: threshold TS too large for N");
  end

  logic [TS-1:0]   a, q;
  logic            unused_q_c, unused_h_c, unused_p_c;
  logic [2*TS-1:0] aq;
  logic [N-1:0]    hi;

  assign a = in1;
  cla_adder #(.W(TS)) u_nq (.a(~in2[TS-1:0]), .b('0), .cin(1'b1), .sum(q), .cout(unused_q_c));
  vedic_ut  #(.N(TS)) u_mul (.inp1(a), .inp2(q), .prod(aq));

  // in1 + in2 - r = in2 + a
  cla_adder #(.W(N)) u_hi (.a(in2), .b(N'(a)), .cin(1'b0), .sum(hi), .cout(unused_h_c));

  // r*(in2 + a) - a*q
  cla_adder #(.W(2*N)) u_sub (.a({1'b0, hi, (N-1)'(0)}), .b(~(2*N)'(aq)), .cin(1'b1),
                              .sum(prod), .cout(unused_p_c));
endmodule
