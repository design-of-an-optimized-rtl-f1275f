// tb_priority_encoder8: exhaustive self-checking testbench of the 8:3
// priority encoder. All 256 request patterns, one per clock cycle; the
// expected code is the index of the highest set request, worked out by
// scanning down from bit 7 (0 when none is set).
module tb_priority_encoder8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] req;
  logic [2:0] code, expect_code;

  priority_encoder8 dut (.req(req), .code(code));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 256; r++) begin
      @(posedge clk);
      req = 8'(r);
      expect_code = 3'd0;
      for (int i = 7; i >= 0; i--)
        if (req[i]) begin expect_code = 3'(i); break; end
      @(negedge clk);
      checks++;
      if (code != expect_code) begin
        failures++;
        $display("FAIL req=%b code=%0d expected %0d", req, code, expect_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
