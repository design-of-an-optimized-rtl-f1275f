// ut_square2: 2-bit Urdhva squarer, sq = inp * inp.
//
// With both operands equal the crosswise pair a1a0 + a0a1 becomes 2a1a0,
// a shift: bit 0 is a0, bit 1 is always 0, and the vertical a1a1 = a1 plus
// the carry a1a0 gives bits 2 and 3 through one half adder. Combinational.
module ut_square2 (
  input  logic [1:0] inp,
  output logic [3:0] sq
);
  logic c1;
  assign c1    = inp[1] & inp[0];   // carry of step 1 (2*a1a0)
  assign sq[0] = inp[0];
  assign sq[1] = 1'b0;
  assign sq[2] = inp[1] ^ c1;
  assign sq[3] = inp[1] & c1;
endmodule
