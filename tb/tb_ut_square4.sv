// tb_ut_square4: exhaustive self-checking testbench of the 4-bit Urdhva
// squarer: every operand, one per clock cycle, checked against the square
// computed by the language's multiplication. A watchdog ends the run if it
// stalls.
module tb_ut_square4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] a;
  logic [7:0] s;

  ut_square4 dut (.inp(a), .sq(s));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 4); i++) begin
      @(posedge clk);
      a = 4'(i);
      @(negedge clk);
      checks++;
      if (s != 8'(i * i)) begin
        failures++;
        $display("FAIL %0d^2 gave %0d", i, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
