// Parallel FIR filter of order N: y_n = sum_{i=0..N} h_i * x_{n-i}.
//
// The filter is built to compare the ways of storing the signal history and
// of multiplying it by the coefficients:
//   ARCH  = ARCH_CLASSIC    samples shift through a delay line of A/B cell
//                           pairs (2-phase transfer), coefficients fixed;
//           ARCH_ROT_SWITCH samples stay in a rotational memory written by an
//                           (N+1)-phase generator, a rotation switch routes
//                           cell to coefficient (default);
//           ARCH_ROT_RING   rotational memory as above, but the coefficients
//                           circulate through their ring by one position per
//                           sample, so cell j always meets the right h.
//   MULT  = MULT_TREE       asynchronous binary-tree multipliers (default);
//           MULT_SERIAL     serial shift-and-add multipliers (L cycles each).
//   NMULT                   multipliers working at the same time. Each one is
//                           switched over STEPS = (N+1)/NMULT coefficient and
//                           sample pairs; NMULT = N+1 is fully parallel,
//                           NMULT = 1 (default) is a single multiplexed
//                           multiplier, the recommended choice when N+1 is
//                           close to the coefficient width.
// The products of one step are added by a parallel summing block and
// accumulated over the steps in an ACU of AW = K + L + log2(N+1) bits, wide
// enough that y never overflows.
//
// Number formats: coefficients h are K-bit two's complement (their sign bit
// drives the multipliers' fill input); samples x are L-bit unsigned (a signed
// signal is offset by a DC value to make it positive); y is AW-bit two's
// complement.
//
// Interface and timing (one clock, active-low asynchronous reset):
//   coef_valid/coef_ready/coef_in  load one coefficient per transfer; a
//       coefficient set is N+1 transfers in the order h_0, h_1, ..., h_N.
//       Each transfer takes 3 cycles. With ARCH_ROT_RING a load also sets the
//       write phase back to cell 0, so the history samples are paired with
//       the right coefficients only after N+1 new samples.
//   in_valid/in_ready/x_in  one sample per transfer, accepted only when no
//       coefficient is offered.
//   y_valid/y_out  y_out is valid for the one cycle y_valid is high.
//   With MULT_TREE a sample accepted in cycle t gives y_valid in cycle
//   t + STEPS + 3 (35 cycles at the defaults); with MULT_SERIAL each step
//   takes L + 2 cycles instead of one. Memory cells reset to zero, so the
//   filter starts from an all-zero history.
// The defaults (N = 31, K = L = 32, one tree multiplier) are the 32-coefficient
// example filter at the point where the filter length equals the
// coefficient width; the widths are this design's choice.
module fir_top
  import fir_pkg::*;
#(
  parameter int unsigned N     = 31,             // filter order
  parameter int unsigned K     = 32,             // coefficient width
  parameter int unsigned L     = 32,             // sample width, power of two
  parameter int unsigned NMULT = 1,              // multipliers in parallel, divides N+1
  parameter fir_arch_e   ARCH  = ARCH_ROT_SWITCH,
  parameter fir_mult_e   MULT  = MULT_TREE,
  localparam int unsigned AW   = K + L + $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_valid,
  output logic          coef_ready,
  input  logic [K-1:0]  coef_in,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [L-1:0]  x_in,
  output logic          y_valid,
  output logic [AW-1:0] y_out
);
  localparam int unsigned N1    = N + 1;
  localparam int unsigned STEPS = N1 / NMULT;
  localparam int unsigned PW    = K + L;
  localparam int unsigned SW    = PW + $clog2(NMULT > 1 ? NMULT : 2);
  localparam int unsigned SB    = $clog2(STEPS > 1 ? STEPS : 2);

  // ---------------------------------------------------------------- control
  logic          ld_ck1, ld_ck2, smp_ck1, smp_ck2;
  logic          mult_start, mult_done, acc_clr, acc_en;
  logic [SB-1:0] step;
  logic [K-1:0]  h_reg;
  logic [L-1:0]  x_reg;

  fir_ctrl #(.STEPS(STEPS), .SERIAL(MULT == MULT_SERIAL)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .coef_valid(coef_valid),
    .coef_ready(coef_ready),
    .mult_done (mult_done),
    .ld_ck1    (ld_ck1),
    .ld_ck2    (ld_ck2),
    .smp_ck1   (smp_ck1),
    .smp_ck2   (smp_ck2),
    .mult_start(mult_start),
    .acc_clr   (acc_clr),
    .acc_en    (acc_en),
    .y_valid   (y_valid),
    .step      (step)
  );

  // Input registers: hold the accepted word while the transfer phases run.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_reg <= '0;
      x_reg <= '0;
    end else begin
      if (coef_valid && coef_ready) h_reg <= coef_in;
      if (in_valid && in_ready)     x_reg <= x_in;
    end
  end

  // ------------------------------------------------------ coefficient ring
  logic [N:0][K-1:0] ring;
  logic              ring_ck1, ring_ck2;

  assign ring_ck1 = ld_ck1 | ((ARCH == ARCH_ROT_RING) & smp_ck1);
  assign ring_ck2 = ld_ck2 | ((ARCH == ARCH_ROT_RING) & smp_ck2);

  coef_ring #(.N(N), .W(K)) u_ring (
    .clk  (clk),
    .rst_n(rst_n),
    .ck1  (ring_ck1),
    .ck2  (ring_ck2),
    .load (ld_ck1),
    .h_in (h_reg),
    .coefs(ring)
  );

  // ------------------------------------------ delay line and pairing with h
  // pair_x[i] and pair_h[i] are the N+1 sample/coefficient pairs whose
  // products add up to y_n. After loading h_0 .. h_N, ring position j holds
  // h_{N-j}.
  logic [N:0][L-1:0] pair_x;
  logic [N:0][K-1:0] pair_h;

  if (ARCH == ARCH_CLASSIC) begin : g_classic
    classic_delay_line #(.N(N), .W(L)) u_dl (
      .clk  (clk),
      .rst_n(rst_n),
      .ck1  (smp_ck1),
      .ck2  (smp_ck2),
      .x_in (x_reg),
      .taps (pair_x)
    );
    for (genvar i = 0; i <= N; i++) begin : g_h
      assign pair_h[i] = ring[N-i];
    end
  end else begin : g_rot
    logic [N:0]        phase, wphase;
    logic [$clog2(N1)-1:0] unused_idx;
    logic [N:0][L-1:0] cells;

    // Write phase ck_0 .. ck_N: advances after each write. In ring mode a
    // coefficient load restarts it so that ring and memory stay aligned.
    multiphase_gen #(.PHASES(N1)) u_phase (
      .clk  (clk),
      .rst_n(rst_n),
      .clr  ((ARCH == ARCH_ROT_RING) & ld_ck1),
      .adv  (smp_ck2),
      .phase(phase),
      .idx  (unused_idx)
    );

    rot_delay_line #(.N(N), .W(L)) u_dl (
      .clk  (clk),
      .rst_n(rst_n),
      .we   (smp_ck1),
      .sel  (phase),
      .x_in (x_reg),
      .cells(cells)
    );

    // Cell that holds the newest sample: the phase before the current one.
    assign wphase = {phase[0], phase[N:1]};

    if (ARCH == ARCH_ROT_SWITCH) begin : g_switch
      rotation_switch #(.N(N), .W(L)) u_sw (
        .cells (cells),
        .wphase(wphase),
        .taps  (pair_x)
      );
      for (genvar i = 0; i <= N; i++) begin : g_h
        assign pair_h[i] = ring[N-i];
      end
    end else begin : g_ringpair
      // Ring position j holds h_{(w-j) mod (N+1)} while cell j holds
      // x_{n-((w-j) mod (N+1))}: pair them position by position.
      assign pair_x = cells;
      assign pair_h = ring;
    end
  end

  // ------------------------------------------------- block of coefficients
  // Multiplier p handles pairs p*STEPS .. p*STEPS + STEPS-1, one per step.
  logic [NMULT-1:0][L-1:0]  op_x;
  logic [NMULT-1:0][K-1:0]  op_h;
  logic [NMULT-1:0][PW-1:0] prod;
  logic [SW-1:0]            step_sum;
  logic [AW-1:0]            acc;

  always_comb begin
    for (int p = 0; p < NMULT; p++) begin
      op_x[p] = pair_x[p * STEPS + int'(step)];
      op_h[p] = pair_h[p * STEPS + int'(step)];
    end
  end

  if (MULT == MULT_TREE) begin : g_tree
    for (genvar p = 0; p < NMULT; p++) begin : g_m
      tree_mult #(.K(K), .L(L)) u_mult (
        .a   (op_h[p]),
        .b   (op_x[p]),
        .fill(op_h[p][K-1]),
        .p   (prod[p])
      );
    end
    assign mult_done = 1'b1;
  end else begin : g_serial
    logic [NMULT-1:0] done, unused_busy;
    for (genvar p = 0; p < NMULT; p++) begin : g_m
      serial_mult #(.K(K), .L(L)) u_mult (
        .clk  (clk),
        .rst_n(rst_n),
        .start(mult_start),
        .a    (op_h[p]),
        .b    (op_x[p]),
        .fill (op_h[p][K-1]),
        .busy (unused_busy[p]),
        .done (done[p]),
        .p    (prod[p])
      );
    end
    assign mult_done = &done;
  end

  sum_tree #(.NIN(NMULT), .W(PW)) u_sum (
    .in (prod),
    .sum(step_sum)
  );

  acu #(.W(AW)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (acc_clr),
    .en    (acc_en),
    .addend(AW'(signed'(step_sum))),
    .acc   (acc)
  );

  assign y_out = acc;

  // N+1 must split evenly over the multipliers.
  if ((N1 % NMULT) != 0) begin : g_bad_nmult
    $error("fir_top: NMULT must divide N+1");
  end
endmodule
