// Sweep over the configurations the comparison of coefficient blocks is made
// for: a 32-coefficient filter (N = 31) with coefficient/sample widths from
// 2 to 16 bits and 1 to 32 tree multipliers working in parallel, plus one
// serial configuration. Each instance runs on its own: it loads random
// coefficients, filters 45 random samples, compares every output with
// y_n = sum h_i x_{n-i}, and checks the cycle count from the accepting edge
// to y_valid: STEPS + 3 for tree multipliers, 3 + STEPS * (L + 2) for serial
// ones, where STEPS = 32 / NMULT. The count shows how the rate scales with
// the number of multipliers.
module fir_sweep_tb
  import fir_pkg::*;
;
  localparam int N = 31, N1 = 32, NC = 7;
  localparam int        KS [NC] = '{2, 4, 8, 8, 8, 16, 8};
  localparam int        LS [NC] = '{2, 4, 8, 8, 8, 16, 8};
  localparam int        PS [NC] = '{1, 32, 2, 8, 16, 2, 4};
  localparam fir_mult_e MS [NC] = '{MULT_TREE, MULT_TREE, MULT_TREE, MULT_TREE, MULT_TREE, MULT_TREE, MULT_SERIAL};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit finished [NC];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int K = KS[c], L = LS[c], P = PS[c];
    localparam int AW = K + L + 5;
    localparam int STEPS = N1 / P;
    localparam int LAT = (MS[c] == MULT_TREE) ? STEPS + 3 : 3 + STEPS * (L + 2);

    logic          cv = 0, cr, iv = 0, ir, yv;
    logic [K-1:0]  cin = '0;
    logic [L-1:0]  xin = '0;
    logic [AW-1:0] y;
    logic signed [K-1:0] h [N1];
    logic [L-1:0]  hist [N1];

    fir_top #(.N(N), .K(K), .L(L), .NMULT(P), .ARCH(ARCH_ROT_SWITCH), .MULT(MS[c])) u (
      .clk(clk), .rst_n(rst_n), .coef_valid(cv), .coef_ready(cr), .coef_in(cin),
      .in_valid(iv), .in_ready(ir), .x_in(xin), .y_valid(yv), .y_out(y));

    initial begin
      int t0;
      logic signed [63:0] s;
      finished[c] = 0;
      foreach (hist[i]) hist[i] = '0;
      wait (rst_n);
      for (int i = 0; i < N1; i++) begin
        h[i] = K'($urandom);
        @(negedge clk); cin = h[i]; cv = 1;
        while (!cr) @(negedge clk);
        @(negedge clk); cv = 0;
      end
      for (int n = 0; n < 45; n++) begin
        for (int i = N1 - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = L'($urandom);
        s = 0;
        for (int i = 0; i < N1; i++) s += 64'(h[i]) * signed'({{(64-L){1'b0}}, hist[i]});
        @(negedge clk); xin = hist[0]; iv = 1;
        while (!ir) @(negedge clk);
        t0 = cyc;
        @(negedge clk); iv = 0;
        while (!yv) @(negedge clk);
        checks += 2;
        if (y !== s[AW-1:0]) begin
          failures++;
          $display("FAIL cfg %0d sample %0d: y=%0d expected %0d", c, n, signed'(y), s);
        end
        if (cyc - t0 != LAT) begin
          failures++;
          $display("FAIL cfg %0d latency %0d expected %0d", c, cyc - t0, LAT);
        end
      end
      $display("  K=%0d L=%0d NMULT=%0d %s: %0d cycles per output", K, L, P,
               MS[c] == MULT_TREE ? "tree" : "serial", LAT + 1);
      finished[c] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    forever begin
      bit all;
      all = 1;
      @(negedge clk);
      foreach (finished[c]) all &= finished[c];
      if (all) break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
