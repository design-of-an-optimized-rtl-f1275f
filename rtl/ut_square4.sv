// ut_square4: 4-bit Urdhva squarer, sq = inp * inp, the leaf of the large
// squarers.
//
// The steps are those of the 4-bit Urdhva multiplier with both operands
// equal: each crosswise pair a_i a_j + a_j a_i collapses to 2 a_i a_j (one
// AND gate and a one-bit shift) and each vertical a_i a_i to a_i, so step k
// sums at most two ANDs and one operand bit before the carry of step k-1 is
// added by a 3-bit carry look-ahead adder. LSB of step k is bit k, the rest
// is the carry into step k+1; carry c_6 is bit 7. Combinational.
module ut_square4 (
  input  logic [3:0] inp,
  output logic [7:0] sq
);
  logic [6:0][2:0] col;
  logic [7:0][2:0] carry;
  logic [6:0][2:0] step;

  always_comb begin
    for (int k = 0; k < 7; k++) begin
      col[k] = '0;
      for (int i = 0; i < 4; i++) begin
        for (int j = i; j < 4; j++) begin
          if (i + j == k) begin
            if (i == j) col[k] = col[k] + 3'(inp[i]);                  // a_i a_i = a_i
            else        col[k] = col[k] + {1'b0, inp[i] & inp[j], 1'b0}; // 2 a_i a_j
          end
        end
      end
    end
  end

  assign carry[0] = '0;
  for (genvar k = 0; k < 7; k++) begin : g_step
    logic unused_cout;
    cla_adder #(.W(3)) u_add (.a(col[k]), .b(carry[k]), .cin(1'b0),
                              .sum(step[k]), .cout(unused_cout));
    assign sq[k]        = step[k][0];
    assign carry[k + 1] = {1'b0, step[k][2:1]};
  end
  assign sq[7] = carry[7][0];
endmodule
