// sampoornam: integrated ("absolute") Vedic multiplier, prod = x * y for
// unsigned N-bit operands.
//
// No single multiplier is best for every operand pair, so this unit holds
// several and lets a logic block pick one per operation from the operand
// values (see sampoornam_logic):
//   - x or y equal to the base 2^(N-1): the other operand shifted left by N-1
//   - x == y: the Urdhva squarer ut_square
//   - operands within 2^TS - 1 of the base: one of the three thresholding
//     Nikhilam units nikh_gg / nikh_ss / nikh_sg, which reduce the N-bit
//     multiplication to a TS-bit one plus additions
//   - either operand 0: product 0
//   - anything else: the Karatsuba-scaled Urdhva multiplier vedic_ut.
// Only the chosen unit is fed the operands; the others see zeros (operand
// isolation), so only one unit switches per operation. The unit outputs are
// merged by a multiplexer driven by sel, which is also brought out.
// Combinational: the result is valid one logic-block plus one unit delay
// after the operands settle. Defaults N = 128 and TS = N/4 = 32 follow the
// design; the isolation by AND gating is this design's way of turning the
// units off. The difference-of-squares and successive Nikhilam schemes are
// deliberately not part of this multiplier, as in the original design.
module sampoornam
  import vedic_pkg::*;
#(
  parameter int unsigned N  = 128,
  parameter int unsigned TS = N / 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] prod,
  output design_sel_e    sel
);
  logic [N-1:0]   op_hi, op_lo;
  logic           en_ut, en_sq, en_gg, en_ss, en_sg;
  logic [2*N-1:0] p_ut, p_sq, p_gg, p_ss, p_sg;

  sampoornam_logic #(.N(N), .TS(TS)) u_logic (.x(x), .y(y), .op_hi(op_hi), .op_lo(op_lo), .sel(sel));

  assign en_ut = (sel == SEL_UT);
  assign en_sq = (sel == SEL_SQUARE);
  assign en_gg = (sel == SEL_NIKH_GG);
  assign en_ss = (sel == SEL_NIKH_SS);
  assign en_sg = (sel == SEL_NIKH_SG);

  vedic_ut   #(.N(N))         u_ut (.inp1(op_hi & {N{en_ut}}), .inp2(op_lo & {N{en_ut}}), .prod(p_ut));
  ut_square  #(.N(N))         u_sq (.inp(x & {N{en_sq}}), .sq(p_sq));
  nikh_gg    #(.N(N), .TS(TS)) u_gg (.in1(op_hi[TS-1:0] & {TS{en_gg}}), .in2(op_lo[TS-1:0] & {TS{en_gg}}), .prod(p_gg));
  nikh_ss    #(.N(N), .TS(TS)) u_ss (.in1(op_hi & {N{en_ss}}), .in2(op_lo[TS-1:0] & {TS{en_ss}}), .prod(p_ss));
  nikh_sg    #(.N(N), .TS(TS)) u_sg (.in1(op_hi[TS-1:0] & {TS{en_sg}}), .in2(op_lo & {N{en_sg}}), .prod(p_sg));

  always_comb begin
    unique case (sel)
      SEL_SHIFT_Y: prod = (2*N)'(y) << (N - 1);
      SEL_SHIFT_X: prod = (2*N)'(x) << (N - 1);
      SEL_SQUARE:  prod = p_sq;
      SEL_NIKH_SG: prod = p_sg;
      SEL_NIKH_SS: prod = p_ss;
      SEL_NIKH_GG: prod = p_gg;
      SEL_UT:      prod = p_ut;
      default:     prod = '0;   // SEL_ZERO
    endcase
  end

  // at most one unit is ever switched on
  always_comb begin
    assert ($onehot0({en_ut, en_sq, en_gg, en_ss, en_sg}))
      else $error("sampoornam: more than one multiplier unit enabled");
  end
endmodule
