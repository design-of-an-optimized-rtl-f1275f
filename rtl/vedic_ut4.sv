// vedic_ut4: 4-bit Urdhva Tiryakbhyam multiplier, prod = inp1 * inp2, the
// leaf of the large multipliers.
//
// Step k (k = 0..6) adds the crosswise products a_i b_j with i + j = k and
// the carry c_(k-1) of step k-1; the LSB of that sum is product bit k and
// the remaining bits are the carry c_k into step k+1. The last carry c_6 is
// product bit 7. A column holds at most four products and no carry exceeds
// 3, so every step fits in 3 bits; the carry is added by a 3-bit carry
// look-ahead adder. The column count of the partial products is this
// design's own choice of how to sum them. Combinational.
module vedic_ut4 (
  input  logic [3:0] inp1,
  input  logic [3:0] inp2,
  output logic [7:0] prod
);
  logic [6:0][2:0] col;    // number of partial products in step k
  logic [7:0][2:0] carry;  // carry[k] enters step k; carry[0] = 0
  logic [6:0][2:0] step;   // col[k] + carry[k]

  always_comb begin
    for (int k = 0; k < 7; k++) begin
      col[k] = '0;
      for (int i = 0; i < 4; i++)
        if (k - i >= 0 && k - i < 4)
          col[k] = col[k] + 3'(inp1[i] & inp2[k-i]);
    end
  end

  assign carry[0] = '0;
  for (genvar k = 0; k < 7; k++) begin : g_step
    logic unused_cout;
    cla_adder #(.W(3)) u_add (.a(col[k]), .b(carry[k]), .cin(1'b0),
                              .sum(step[k]), .cout(unused_cout));
    assign prod[k]      = step[k][0];
    assign carry[k + 1] = {1'b0, step[k][2:1]};
  end
  assign prod[7] = carry[7][0];
endmodule
