// tb_sampoornam8: exhaustive self-checking testbench of the integrated
// multiplier at N = 8 (threshold TS = 2, base 128). All 65536 operand pairs,
// one per clock cycle; each product is compared with the language's
// multiplication and each select code with a comparison-based reference
// model. Counts how often every select code occurs and fails if one never
// does. A watchdog ends a stalled run.
module tb_sampoornam8;
  import vedic_pkg::*;
  import sel_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hits[8];

  logic [7:0]  x, y;
  logic [15:0] prod;
  design_sel_e sel;

  sampoornam #(.N(8), .TS(2)) dut (.x(x), .y(y), .prod(prod), .sel(sel));

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        @(posedge clk);
        x = 8'(i);
        y = 8'(j);
        @(negedge clk);
        hits[sel]++;
        checks++;
        if (prod != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d gave %0d (sel %0d)", i, j, prod, sel);
        end
        checks++;
        if (sel != sel_model(128'(x), 128'(y), 8, 2)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d, %0d selected %0d", i, j, sel);
        end
      end
    end
    for (int k = 0; k < 8; k++) begin
      $display("select code %0d used %0d times", k, hits[k]);
      if (hits[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
