// vedic_ut: N x N unsigned Vedic multiplier, prod = inp1 * inp2, for N in
// 2, 4, 8, 16, 32, 64 and 128.
//
// N = 2 and N = 4 are Urdhva Tiryakbhyam ("vertically and crosswise")
// multipliers (vedic_ut2, vedic_ut4). Each larger size vedic_utN is built
// from three N/2-bit multipliers by one Karatsuba-Ofman level
// (karatsuba_stage), so the 128-bit multiplier holds 3^5 = 243 4-bit Urdhva
// leaves. This wrapper only picks the module of the requested size; sizes
// above 128 would need further vedic_utN modules. Combinational; the delay
// grows by one multiplier-and-adder level for each doubling of N.
module vedic_ut #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0]   inp1,
  input  logic [N-1:0]   inp2,
  output logic [2*N-1:0] prod
);
  if (N == 2) begin : g_2
    vedic_ut2 u_mul (.inp1(inp1), .inp2(inp2), .prod(prod));
  end else if (N == 4) begin : g_4
    vedic_ut4 u_mul (.inp1(inp1), .inp2(inp2), .prod(prod));
  end else if (N == 8) begin : g_8
    vedic_ut8 u_mul (.inp1(inp1), .inp2(inp2), .prod(prod));
  end else if (N == 16) begin : g_16
    vedic_ut16 u_mul (.inp1(inp1), .inp2(inp2), .prod(prod));
  end else if (N == 32) begin : g_32
    vedic_ut32 u_mul (.inp1(inp1), .inp2(inp2), .prod(prod));
  end else if (N == 64) begin : g_64
    vedic_ut64 u_mul (.inp1(inp1), .inp2(inp2), .prod(prod));
  end else if (N == 128) begin : g_128
    vedic_ut128 u_mul (.inp1(inp1), .inp2(inp2), .prod(prod));
  end else begin : g_bad
    $error("vedic_ut: N must be 2, 4, 8, 16, 32, 64 or 128");
  end
endmodule
