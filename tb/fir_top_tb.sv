// End-to-end test of the parallel FIR filter, all instances at N = 31:
//   u0        the filter with every parameter at its default (32-bit
//             coefficients and samples, rotational memory + rotation switch,
//             one multiplexed tree multiplier);
// and four variants at 8-bit coefficients and samples (they receive the top
// byte of the words given to u0, which keeps their simulation model small):
//   g_v[1]    classic shift-register delay line, 32 tree multipliers
//             (fully parallel);
//   g_v[2]    rotational memory + circulating coefficient ring, 4 tree
//             multipliers;
//   g_v[3]    rotational memory + rotation switch, 32 serial multipliers;
//   g_v[4]    classic delay line, 2 serial multipliers.
// All receive the same coefficients and samples. Each output is compared with
// y_n = sum h_i x_{n-i} computed here from the sample history (zero before the
// first sample). Three coefficient sets are used: random values, extreme
// values (every h = -2^31 with samples 2^32-1, the largest magnitude the
// output must hold), and random values again loaded in mid-stream. After a
// load the ring instance restarts its write phase, so its next 32 outputs
// mix old and new history and are not compared.
// Also checked: the default instance's latency (STEPS + 3 = 35 cycles from
// the accepting edge) and that each mechanism occurred: write-phase wrap,
// multiplexing steps, negative coefficients, classic two-phase shifts, ring
// rotations, serial multiplications, coefficient reloads.
module fir_top_tb
  import fir_pkg::*;
;
  localparam int N = 31, K = 32, L = 32, N1 = N + 1;
  localparam int AW = K + L + $clog2(N1);
  localparam int KV = 8, LV = 8, AWV = KV + LV + $clog2(N1);
  localparam int NI = 5;
  localparam fir_arch_e ARCHS [NI] = '{ARCH_ROT_SWITCH, ARCH_CLASSIC, ARCH_ROT_RING, ARCH_ROT_SWITCH, ARCH_CLASSIC};
  localparam fir_mult_e MULTS [NI] = '{MULT_TREE, MULT_TREE, MULT_TREE, MULT_SERIAL, MULT_SERIAL};
  localparam int        NMS   [NI] = '{1, 32, 4, 32, 2};

  typedef struct {
    logic [AW-1:0] val;
    bit            chk;
  } exp_t;

  logic clk = 0, rst_n = 0;
  logic [K-1:0] coef_in = '0;
  logic [L-1:0] x_in = '0;
  logic         cv [NI], cr [NI], iv [NI], ir [NI], yv [NI];
  logic [AW-1:0] y [NI];

  int checks = 0, failures = 0;
  int cyc = 0;
  exp_t expq [NI][$];
  int   n_out [NI];
  int   skip_ring = 0;

  logic signed [K-1:0] h [N1];
  logic [L-1:0]        hist [$];
  int n_samples = 0;

  // mechanism counters
  int n_wrap = 0, n_steps = 0, n_neg = 0, n_classic = 0, n_ringrot = 0, n_serial = 0, n_reload = 0;
  int t_acc0 = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fir_top u0 (
    .clk(clk), .rst_n(rst_n), .coef_valid(cv[0]), .coef_ready(cr[0]), .coef_in(coef_in),
    .in_valid(iv[0]), .in_ready(ir[0]), .x_in(x_in), .y_valid(yv[0]), .y_out(y[0]));

  for (genvar i = 1; i < NI; i++) begin : g_v
    logic [AWV-1:0] yv8;
    fir_top #(.N(N), .K(KV), .L(LV), .NMULT(NMS[i]), .ARCH(ARCHS[i]), .MULT(MULTS[i])) u (
      .clk(clk), .rst_n(rst_n), .coef_valid(cv[i]), .coef_ready(cr[i]), .coef_in(coef_in[K-1 -: KV]),
      .in_valid(iv[i]), .in_ready(ir[i]), .x_in(x_in[L-1 -: LV]), .y_valid(yv[i]), .y_out(yv8));
    assign y[i] = AW'(yv8);
  end

  // Output checkers
  for (genvar i = 0; i < NI; i++) begin : g_chk
    always @(posedge clk) begin
      if (rst_n && yv[i]) begin
        if (expq[i].size() == 0) begin
          failures++;
          $display("FAIL instance %0d: unexpected output", i);
        end else begin
          exp_t e;
          e = expq[i].pop_front();
          n_out[i]++;
          if (e.chk) begin
            checks++;
            if (y[i] !== e.val) begin
              failures++;
              $display("FAIL instance %0d output %0d: y=%0d expected %0d", i, n_out[i],
                       signed'(y[i]), signed'(e.val));
            end
          end
        end
        if (i == 0) begin
          checks++;
          if (cyc - t_acc0 != N1 + 3) begin
            failures++;
            $display("FAIL default latency %0d cycles", cyc - t_acc0);
          end
        end
      end
    end
  end

  // Mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (u0.smp_ck2 && u0.g_rot.phase[N]) n_wrap++;
    if (u0.acc_en) n_steps++;
    if (u0.acc_en && u0.op_h[0][K-1]) n_neg++;
    if (g_v[1].u.smp_ck2) n_classic++;
    if (g_v[2].u.ring_ck2 && !g_v[2].u.ld_ck2) n_ringrot++;
    if (g_v[3].u.acc_en && g_v[3].u.mult_done) n_serial++;
  end

  // y_n from the history; narrow = 1 uses the top bytes, as the variants do.
  function automatic logic [AW-1:0] golden(bit narrow);
    logic signed [127:0] s = 0;
    for (int i = 0; i < N1; i++)
      if (i < hist.size()) begin
        if (narrow) s += 128'(signed'(h[i][K-1 -: KV])) * signed'({120'd0, hist[i][L-1 -: LV]});
        else        s += 128'(h[i]) * signed'({96'd0, hist[i]});
      end
    return narrow ? AW'(s[AWV-1:0]) : s[AW-1:0];
  endfunction

  task automatic send_coef(logic [K-1:0] val);
    bit take [NI];
    coef_in = val;
    foreach (cv[i]) cv[i] = 1;
    forever begin
      bit any = 0;
      @(negedge clk);
      foreach (cv[i]) take[i] = cv[i] && cr[i];
      @(posedge clk);
      #1;
      foreach (cv[i]) begin
        if (take[i]) cv[i] = 0;
        any |= cv[i];
      end
      if (!any) break;
    end
  endtask

  task automatic load_set(int kind);
    for (int i = 0; i < N1; i++) begin
      case (kind)
        0: h[i] = K'($urandom);
        1: h[i] = {1'b1, {(K-1){1'b0}}};
        default: h[i] = (i % 3 == 0) ? -K'($urandom % 1000) : K'($urandom % 100000);
      endcase
      send_coef(h[i]);
    end
    n_reload++;
  endtask

  task automatic send_sample(logic [L-1:0] val);
    bit take [NI];
    x_in = val;
    hist.push_front(val);
    if (hist.size() > N1) void'(hist.pop_back());
    foreach (iv[i]) begin
      exp_t e;
      e.val = golden(i != 0);
      e.chk = !(i == 2 && skip_ring > 0);
      expq[i].push_back(e);
      iv[i] = 1;
    end
    if (skip_ring > 0) skip_ring--;
    forever begin
      bit any = 0;
      @(negedge clk);
      foreach (iv[i]) take[i] = iv[i] && ir[i];
      if (take[0]) t_acc0 = cyc;
      @(posedge clk);
      #1;
      foreach (iv[i]) begin
        if (take[i]) iv[i] = 0;
        any |= iv[i];
      end
      if (!any) break;
    end
    n_samples++;
  endtask

  task automatic drain();
    int t = 0;
    forever begin
      bit busy = 0;
      foreach (expq[i]) if (expq[i].size() != 0) busy = 1;
      if (!busy || t > 5000) break;
      @(negedge clk);
      t++;
    end
  endtask

  task automatic expect_count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %s: %0d", what, n);
  endtask

  initial begin
    foreach (cv[i]) begin cv[i] = 0; iv[i] = 0; n_out[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    load_set(0);
    for (int s = 0; s < 40; s++) send_sample(L'($urandom));
    drain();

    load_set(1);
    skip_ring = N1;
    for (int s = 0; s < 34; s++) send_sample({L{1'b1}});
    drain();

    load_set(2);
    skip_ring = N1;
    for (int s = 0; s < 40; s++) send_sample(L'($urandom));
    drain();

    foreach (n_out[i]) begin
      checks++;
      if (n_out[i] != n_samples) begin
        failures++;
        $display("FAIL instance %0d produced %0d outputs for %0d samples", i, n_out[i], n_samples);
      end
    end
    expect_count("write-phase wraps ck_N -> ck_0", n_wrap);
    expect_count("multiplexed multiplier steps", n_steps);
    expect_count("products with a negative coefficient", n_neg);
    expect_count("classic two-phase shifts", n_classic);
    expect_count("coefficient ring rotations", n_ringrot);
    expect_count("serial multiplications finished", n_serial);
    expect_count("coefficient set loads", n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
