// tb_cla_adder: self-checking testbench of the carry look-ahead adder.
//
// Instantiates the adder at widths 1, 3, 4, 8, 16, 35, 64 and 256 (power-of-
// two widths with 2- and 4-group top levels and padded odd widths) and
// checks {cout, sum} against the language's own addition for random
// operands, long-carry cases (b = ~a with cin = 1) and all-ones operands.
// One vector per clock cycle; a watchdog ends the run if it stalls.
module tb_cla_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NW = 8;
  localparam int WS[NW] = '{1, 3, 4, 8, 16, 35, 64, 256};

  for (genvar gi = 0; gi < NW; gi++) begin : g_w
    localparam int W = WS[gi];
    logic [W-1:0] a, b, s;
    logic         ci, co;
    cla_adder #(.W(W)) dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  end

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i+:32] = $urandom();
    return v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < NW; gi++) begin : g_chk
    localparam int W = WS[gi];
    initial begin
      logic [256:0] ref_v;
      @(posedge clk);
      for (int t = 0; t < 2000; t++) begin
        g_w[gi].a  = W'(rnd256());
        g_w[gi].b  = W'(rnd256());
        g_w[gi].ci = 1'($urandom());
        case (t % 5)
          0: begin g_w[gi].b = ~g_w[gi].a; g_w[gi].ci = 1'b1; end
          1: begin g_w[gi].a = '1; g_w[gi].b = '1; end
          default: ;
        endcase
        @(negedge clk);
        ref_v = 257'(g_w[gi].a) + 257'(g_w[gi].b) + 257'(g_w[gi].ci);
        checks++;
        if ({g_w[gi].co, g_w[gi].s} != ref_v[W:0]) begin
          failures++;
          if (failures < 10) $display("FAIL W=%0d a=%h b=%h cin=%b got %h", W,
                                      g_w[gi].a, g_w[gi].b, g_w[gi].ci, {g_w[gi].co, g_w[gi].s});
        end
        @(posedge clk);
      end
    end
  end

  initial begin
    repeat (2005) @(posedge clk);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
