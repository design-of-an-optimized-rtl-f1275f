// tb_vedic_ut4: exhaustive self-checking testbench of the 4-bit Urdhva
// Tiryakbhyam multiplier: every operand pair, one per clock cycle, checked
// against the product computed by the language's multiplication. A
// watchdog ends the run if it stalls.
module tb_vedic_ut4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] p;

  vedic_ut4 dut (.inp1(a), .inp2(b), .prod(p));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 4); i++) begin
      for (int j = 0; j < (1 << 4); j++) begin
        @(posedge clk);
        a = 4'(i);
        b = 4'(j);
        @(negedge clk);
        checks++;
        if (p != 8'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d gave %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
