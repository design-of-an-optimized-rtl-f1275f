// tb_sampoornam: end-to-end self-checking testbench of the integrated
// multiplier at its default size (N = 128, TS = 32; no parameter override).
//
// Operand pairs are drawn in turn from every class the logic block tells
// apart: x or y equal to the base 2^127, equal operands, pairs within the
// threshold above / below / on both sides of the base (in either order, so
// the operand swap is exercised), pairs with a zero, and unrestricted random
// pairs. Each cycle checks
//   - the product against the language's 256-bit multiplication,
//   - the select code against a comparison-based reference model,
//   - operand isolation: every unit that is not selected has zero inputs and
//     so its idle product (zero, or the constant r*r term for nikh_gg).
// It counts how often each of the eight select codes and the operand swap
// occurred and fails if any never did. A watchdog ends a stalled run.
module tb_sampoornam;
  import vedic_pkg::*;
  import sel_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int VECS = 1200;

  int checks = 0, failures = 0;
  int hits[8];
  int swaps = 0;

  logic [127:0] x, y;
  logic [255:0] prod;
  design_sel_e  sel;

  sampoornam dut (.x(x), .y(y), .prod(prod), .sel(sel));

  localparam logic [127:0] B  = 128'd1 << 127;
  localparam logic [127:0] TH = (128'd1 << 32) - 1;

  function automatic logic [127:0] rnd128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  function automatic logic [127:0] offs();  // 1 .. TH
    logic [31:0] r;
    r = 32'd1 + ($urandom() % 32'hffff_ffff);
    return 128'(r);
  endfunction

  initial begin
    repeat (VECS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_unit(string name, logic [255:0] p, logic is_on,
                                  logic [255:0] idle);
    checks++;
    if (!is_on && p != idle) begin
      failures++;
      if (failures < 10) $display("FAIL unit %s not isolated (sel=%0d)", name, sel);
    end
  endtask

  initial begin
    logic [255:0] expect_p;
    logic [2:0]   expect_sel;
    for (int t = 0; t < VECS; t++) begin
      @(posedge clk);
      case (t % 9)
        0: begin x = B; y = rnd128(); end
        1: begin x = rnd128(); y = B; end
        2: begin x = rnd128(); y = x; end
        3: begin x = B + offs(); y = B - offs(); end
        4: begin x = B - offs(); y = B + offs(); end
        5: begin x = B - offs(); y = B - offs(); end
        6: begin x = B + offs(); y = B + offs(); end
        7: begin x = (($urandom() % 2) != 0) ? '0 : rnd128(); y = (x == '0) ? rnd128() : '0; end
        default: begin x = rnd128(); y = rnd128(); end
      endcase
      if (t == 9)  begin x = B + TH; y = B - TH; end
      if (t == 18) begin x = B + TH; y = B + TH + 1; end   // just outside: general case
      if (t == 27) begin x = '1;     y = '1;         end
      @(negedge clk);
      expect_p   = 256'(x) * 256'(y);
      expect_sel = sel_model(x, y, 128, 32);
      hits[sel]++;
      if (x < y && (sel == SEL_NIKH_SG || sel == SEL_NIKH_SS || sel == SEL_NIKH_GG)) swaps++;
      checks++;
      if (prod != expect_p) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h sel=%0d prod=%h expected %h", x, y, sel, prod, expect_p);
      end
      checks++;
      if (sel != expect_sel) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h sel=%0d expected %0d", x, y, sel, expect_sel);
      end
      check_unit("vedic_ut",  dut.p_ut, sel == SEL_UT, 0);
      check_unit("ut_square", dut.p_sq, sel == SEL_SQUARE, 0);
      check_unit("nikh_gg",   dut.p_gg, sel == SEL_NIKH_GG, 256'(1) << 254);
      check_unit("nikh_ss",   dut.p_ss, sel == SEL_NIKH_SS, 0);
      check_unit("nikh_sg",   dut.p_sg, sel == SEL_NIKH_SG, 0);
    end
    for (int k = 0; k < 8; k++) begin
      $display("select code %0d used %0d times", k, hits[k]);
      if (hits[k] == 0) begin
        failures++;
        $display("FAIL select code %0d never used", k);
      end
    end
    $display("operand swaps into a Nikhilam unit: %0d", swaps);
    if (swaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
