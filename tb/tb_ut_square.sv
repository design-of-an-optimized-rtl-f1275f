// tb_ut_square: self-checking testbench of the Urdhva squarer at every size
// the design builds (2, 4, 8, 16, 32, 64, 128). Each size is driven with operand
// patterns that stress the scaling levels (all ones, which makes every
// half-sum overflow; alternating bits; single bits; zero) and then random
// operands, one vector per clock cycle, and compared with the product the
// language's own multiplication gives. A watchdog ends a stalled run.
module tb_ut_square;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NS = 7;
  localparam int SIZES[NS] = '{2, 4, 8, 16, 32, 64, 128};
  localparam int VECS = 1500;

  for (genvar gi = 0; gi < NS; gi++) begin : g_n
    localparam int N = SIZES[gi];
    logic [N-1:0]   a, b;
    logic [2*N-1:0] p;
    ut_square #(.N(N)) dut (.inp(a), .sq(p));
  end

  function automatic logic [127:0] rnd128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  // operand t of the test sequence
  function automatic logic [127:0] pattern(int t, int which);
    case (t)
      0: return '0;
      1: return '1;
      2: return which ? 128'h5555_5555_5555_5555_5555_5555_5555_5555 : '1;
      3: return 128'haaaa_aaaa_aaaa_aaaa_aaaa_aaaa_aaaa_aaaa;
      4: return which ? 128'd1 : '1;
      default: begin
        logic [127:0] v;
        v = rnd128();
        // sometimes force both halves of every level near all ones
        if (t % 7 == 0) v = v | 128'hffff_ff00_ffff_ff00_ffff_ff00_ffff_ff00;
        return v;
      end
    endcase
  endfunction

  initial begin
    repeat (VECS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < NS; gi++) begin : g_chk
    localparam int N = SIZES[gi];
    initial begin
      logic [255:0] expect_p;
      for (int t = 0; t < VECS; t++) begin
        @(posedge clk);
        g_n[gi].a = N'(pattern(t, 0));
        g_n[gi].b = N'(pattern(t, 1));
        @(negedge clk);
        expect_p = 256'(g_n[gi].a) * 256'(g_n[gi].a);
        checks++;
        if (256'(g_n[gi].p) != expect_p) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d a=%h b=%h got %h", N, g_n[gi].a, g_n[gi].b, g_n[gi].p);
        end
      end
    end
  end

  initial begin
    repeat (VECS + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
