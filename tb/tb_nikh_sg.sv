// tb_nikh_sg: self-checking testbench of the thresholding Nikhilam
// multiplier nikh_sg. in1 is above and in2 below the base 2^(N-1), within
// the threshold 2^TS - 1. At N = 8 (TS = 2) and N = 16 (TS = 4) every
// in-range pair is applied; at N = 128 (TS = 32) the extreme pairs (distance
// 1 and 2^TS - 1 from the base) and random in-range pairs. One pair per
// clock cycle, compared with the language's multiplication; a watchdog
// ends a stalled run.
module tb_nikh_sg;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NS = 3;
  localparam int SIZES[NS] = '{8, 16, 128};

  for (genvar gi = 0; gi < NS; gi++) begin : g_n
    localparam int N = SIZES[gi];
    logic [N-1:0]   a, b;
    logic [2*N-1:0] p;
    nikh_sg #(.N(N), .TS(N / 4)) dut (.in1(a[N/4-1:0]), .in2(b), .prod(p));
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < NS; gi++) begin : g_chk
    localparam int N  = SIZES[gi];
    localparam int TS = N / 4;
    localparam logic [127:0] TH = (128'd1 << TS) - 1;
    initial begin
      logic [127:0] base;
      logic [255:0] expect_p;
      int n_vec;
      base  = 128'd1 << (N - 1);
      n_vec = (N <= 16) ? int'(TH * TH) : 1000;
      for (int t = 0; t < n_vec; t++) begin
        @(posedge clk);
        if (N <= 16) begin
          g_n[gi].a = N'(base + 1 + 128'(t) / TH);
          g_n[gi].b = N'(base - 1 - 128'(t) % TH);
        end else begin
          logic [127:0] da, db;
          da = 1 + ({$urandom(), $urandom(), $urandom(), $urandom()} % TH);
          db = 1 + ({$urandom(), $urandom(), $urandom(), $urandom()} % TH);
          if (t == 0) begin da = 1;  db = 1;  end
          if (t == 1) begin da = TH; db = TH; end
          if (t == 2) begin da = 1;  db = TH; end
          g_n[gi].a = N'(base + da);
          g_n[gi].b = N'(base - db);
        end
        @(negedge clk);
        expect_p = 256'(g_n[gi].a) * 256'(g_n[gi].b);
        checks++;
        if (256'(g_n[gi].p) != expect_p) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d a=%h b=%h got %h", N, g_n[gi].a, g_n[gi].b, g_n[gi].p);
        end
      end
    end
  end

  initial begin
    repeat (1010) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
