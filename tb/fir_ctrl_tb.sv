// Controller test. Instance A: STEPS = 4, combinational multipliers.
// Instance B: STEPS = 3, serial multipliers, modelled here by a done flag that
// rises 5 cycles after mult_start. Per transfer the test records in which
// cycle each strobe appears and checks:
//   coefficient: ld_ck1 one cycle after the transfer, ld_ck2 the cycle after,
//                ready again the cycle after that; coefficients win over
//                samples when both are offered;
//   sample:      smp_ck1 with acc_clr, then smp_ck2, then STEPS acc_en with
//                step = 0, 1, ...; y_valid at STEPS + 3 cycles after the
//                transfer (instance A); in instance B one mult_start per
//                step and acc_en only while mult_done is high.
module fir_ctrl_tb;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  // instance A
  logic a_iv = 0, a_ir, a_cv = 0, a_cr;
  logic a_l1, a_l2, a_s1, a_s2, a_ms, a_clr, a_en, a_yv;
  logic [1:0] a_step;
  // instance B
  logic b_iv = 0, b_ir, b_cv = 0, b_cr, b_done = 0;
  logic b_l1, b_l2, b_s1, b_s2, b_ms, b_clr, b_en, b_yv;
  logic [1:0] b_step;
  int   b_cnt = 0;

  fir_ctrl #(.STEPS(4), .SERIAL(1'b0)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(a_iv), .in_ready(a_ir), .coef_valid(a_cv), .coef_ready(a_cr),
    .mult_done(1'b1), .ld_ck1(a_l1), .ld_ck2(a_l2), .smp_ck1(a_s1), .smp_ck2(a_s2),
    .mult_start(a_ms), .acc_clr(a_clr), .acc_en(a_en), .y_valid(a_yv), .step(a_step));
  fir_ctrl #(.STEPS(3), .SERIAL(1'b1)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(b_iv), .in_ready(b_ir), .coef_valid(b_cv), .coef_ready(b_cr),
    .mult_done(b_done), .ld_ck1(b_l1), .ld_ck2(b_l2), .smp_ck1(b_s1), .smp_ck2(b_s2),
    .mult_start(b_ms), .acc_clr(b_clr), .acc_en(b_en), .y_valid(b_yv), .step(b_step));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // serial multiplier model for instance B
  always @(posedge clk) begin
    if (b_ms) begin b_done <= 0; b_cnt <= 5; end
    else if (b_cnt > 1) b_cnt <= b_cnt - 1;
    else if (b_cnt == 1) begin b_cnt <= 0; b_done <= 1; end
  end

  task automatic expect_eq(int unsigned got, int unsigned want, string what);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: got %0d want %0d", what, got, want); end
  endtask

  initial begin
    int t0, n_en, n_ms, bad_en, exp_step;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // A: coefficient and sample offered together: coefficient first.
    @(negedge clk);
    a_cv = 1; a_iv = 1;
    #1;
    expect_eq(a_cr, 1, "A coef_ready in idle");
    expect_eq(a_ir, 0, "A in_ready low while coefficient offered");
    @(negedge clk); a_cv = 0;
    expect_eq(a_l1, 1, "A ld_ck1");
    @(negedge clk);
    expect_eq(a_l2, 1, "A ld_ck2");
    @(negedge clk);
    expect_eq(a_ir, 1, "A ready after load");
    t0 = cyc;
    @(negedge clk); a_iv = 0;
    expect_eq(a_s1 & a_clr, 1, "A smp_ck1 + acc_clr");
    @(negedge clk);
    expect_eq(a_s2, 1, "A smp_ck2");
    n_en = 0;
    while (!a_yv && cyc - t0 < 50) begin
      @(negedge clk);
      if (a_en) begin expect_eq(a_step, n_en, "A step number"); n_en++; end
    end
    expect_eq(n_en, 4, "A acc_en count");
    expect_eq(cyc - t0, 4 + 3, "A latency");
    @(negedge clk);
    expect_eq(a_ir, 1, "A ready after output");

    // B: one sample through the serial sequence.
    @(negedge clk);
    b_iv = 1;
    t0 = cyc;
    @(negedge clk); b_iv = 0;
    expect_eq(b_s1 & b_clr, 1, "B smp_ck1 + acc_clr");
    @(negedge clk);
    expect_eq(b_s2, 1, "B smp_ck2");
    n_en = 0; n_ms = 0; bad_en = 0; exp_step = 0;
    while (!b_yv && cyc - t0 < 200) begin
      @(negedge clk);
      if (b_ms) n_ms++;
      if (b_en) begin
        if (!b_done) bad_en++;
        expect_eq(b_step, exp_step, "B step number");
        exp_step++;
        n_en++;
      end
    end
    expect_eq(n_en, 3, "B acc_en count");
    expect_eq(n_ms, 3, "B mult_start count");
    expect_eq(bad_en, 0, "B acc_en without mult_done");
    expect_eq(b_yv, 1, "B y_valid reached");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
