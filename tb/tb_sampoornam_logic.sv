// tb_sampoornam_logic: self-checking testbench of the integrated
// multiplier's logic block. At N = 8, TS = 2 every one of the 65536 operand
// pairs is applied; at the default N = 128, TS = 32 directed pairs around the
// base (at it, one and 2^TS - 1 away, one step outside the threshold) and
// random pairs. The select code is compared with a comparison-based
// reference model, and the ordered operands with max and min. One pair per
// clock cycle; a watchdog ends a stalled run.
module tb_sampoornam_logic;
  import vedic_pkg::*;
  import sel_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hits[8];

  logic [7:0]   x8, y8, hi8, lo8;
  design_sel_e  sel8;
  logic [127:0] x, y, hi, lo;
  design_sel_e  sel;

  sampoornam_logic #(.N(8), .TS(2)) dut8 (.x(x8), .y(y8), .op_hi(hi8), .op_lo(lo8), .sel(sel8));
  sampoornam_logic dut (.x(x), .y(y), .op_hi(hi), .op_lo(lo), .sel(sel));

  localparam logic [127:0] B  = 128'd1 << 127;
  localparam logic [127:0] TH = (128'd1 << 32) - 1;

  function automatic logic [127:0] pick(int k);
    case (k % 9)
      0: return B;
      1: return B + 1;
      2: return B + TH;
      3: return B + TH + 1;
      4: return B - 1;
      5: return B - TH;
      6: return B - TH - 1;
      7: return 128'd0;
      default: return {$urandom(), $urandom(), $urandom(), $urandom()};
    endcase
  endfunction

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        @(posedge clk);
        x8 = 8'(i);
        y8 = 8'(j);
        x  = pick($urandom() % 9);
        y  = pick($urandom() % 9);
        if ($urandom() % 16 == 0) y = x;
        @(negedge clk);
        e = sel_model(128'(x8), 128'(y8), 8, 2);
        hits[e]++;
        checks++;
        if (sel8 != e || hi8 != ((x8 >= y8) ? x8 : y8) || lo8 != ((x8 >= y8) ? y8 : x8)) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 x=%0d y=%0d sel=%0d expected %0d", x8, y8, sel8, e);
        end
        e = sel_model(x, y, 128, 32);
        checks++;
        if (sel != e || hi != ((x >= y) ? x : y) || lo != ((x >= y) ? y : x)) begin
          failures++;
          if (failures < 10) $display("FAIL N=128 x=%h y=%h sel=%0d expected %0d", x, y, sel, e);
        end
      end
    end
    for (int k = 0; k < 8; k++) begin
      if (hits[k] == 0) begin
        failures++;
        $display("select code %0d never produced", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
