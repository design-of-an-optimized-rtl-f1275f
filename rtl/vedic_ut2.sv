// vedic_ut2: 2-bit Urdhva Tiryakbhyam ("vertically and crosswise")
// multiplier, prod = inp1 * inp2.
//
// The vertical product a0b0 is bit 0. The two crosswise products a1b0 and
// a0b1 are added by a half adder: its sum is bit 1 and its carry joins the
// second vertical product a1b1 in a second half adder, which gives bits 2
// and 3. Four AND gates and two half adders, as in the 2-bit schematic of
// the design. Combinational.
module vedic_ut2 (
  input  logic [1:0] inp1,
  input  logic [1:0] inp2,
  output logic [3:0] prod
);
  logic pp00, pp10, pp01, pp11;
  logic ha0_c;

  assign pp00 = inp1[0] & inp2[0];
  assign pp10 = inp1[1] & inp2[0];
  assign pp01 = inp1[0] & inp2[1];
  assign pp11 = inp1[1] & inp2[1];

  assign prod[0] = pp00;
  assign prod[1] = pp10 ^ pp01;   // half adder 0, sum
  assign ha0_c   = pp10 & pp01;   // half adder 0, carry
  assign prod[2] = pp11 ^ ha0_c;  // half adder 1, sum
  assign prod[3] = pp11 & ha0_c;  // half adder 1, carry
endmodule
