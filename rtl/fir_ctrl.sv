// Control and clock-phase sequencer of the parallel FIR filter.
//
// Everything runs on one system clock; the clock phases that the filter's
// memories need are produced as one-cycle enables:
//   * Coefficient load (coef_valid in IDLE): LD1 gives ld_ck1, LD2 ld_ck2,
//     i.e. one ck1/ck2 pair that shifts the coefficient ring by one position.
//   * New sample (in_valid in IDLE, coefficient loads take priority): S1 gives
//     smp_ck1 (first transfer phase; write strobe of the rotational memory)
//     and clears the output accumulator, S2 gives smp_ck2 (second transfer
//     phase; the rotational phase generator advances).
//   * Computation: the coefficient block is multiplexed over STEPS steps.
//     With SERIAL = 0 (combinational tree multipliers) each step is one CALC
//     cycle with acc_en. With SERIAL = 1 each step is an MSTART cycle
//     (mult_start) followed by MWAIT cycles until mult_done, the cycle in
//     which acc_en is given. step numbers the current step.
//   * OUT: y_valid for one cycle, then back to IDLE.
// in_ready and coef_ready are high only in IDLE; a transfer happens when
// valid and ready are both high. With SERIAL = 0 a sample accepted in cycle t
// gives y_valid in cycle t + STEPS + 3 and the next sample can be accepted in
// cycle t + STEPS + 4.
module fir_ctrl #(
  parameter int unsigned STEPS  = 32,  // multiplexing steps per output sample
  parameter bit          SERIAL = 1'b0 // 1: multipliers are serial (need mult_done)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic coef_valid,
  output logic coef_ready,
  input  logic mult_done,
  output logic ld_ck1,
  output logic ld_ck2,
  output logic smp_ck1,
  output logic smp_ck2,
  output logic mult_start,
  output logic acc_clr,
  output logic acc_en,
  output logic y_valid,
  output logic [$clog2(STEPS > 1 ? STEPS : 2)-1:0] step
);
  localparam int unsigned SB = $clog2(STEPS > 1 ? STEPS : 2);

  typedef enum logic [3:0] {
    IDLE, LD1, LD2, S1, S2, CALC, MSTART, MWAIT, OUT
  } state_e;

  state_e state, state_nx;
  logic   last_step;

  assign last_step = (step == SB'(STEPS - 1));

  always_comb begin
    state_nx   = state;
    coef_ready = 1'b0;
    in_ready   = 1'b0;
    ld_ck1     = 1'b0;
    ld_ck2     = 1'b0;
    smp_ck1    = 1'b0;
    smp_ck2    = 1'b0;
    mult_start = 1'b0;
    acc_clr    = 1'b0;
    acc_en     = 1'b0;
    y_valid    = 1'b0;
    unique case (state)
      IDLE: begin
        coef_ready = 1'b1;
        in_ready   = !coef_valid;
        if (coef_valid)    state_nx = LD1;
        else if (in_valid) state_nx = S1;
      end
      LD1: begin ld_ck1 = 1'b1; state_nx = LD2; end
      LD2: begin ld_ck2 = 1'b1; state_nx = IDLE; end
      S1:  begin smp_ck1 = 1'b1; acc_clr = 1'b1; state_nx = S2; end
      S2:  begin smp_ck2 = 1'b1; state_nx = SERIAL ? MSTART : CALC; end
      CALC: begin
        acc_en = 1'b1;
        if (last_step) state_nx = OUT;
      end
      MSTART: begin mult_start = 1'b1; state_nx = MWAIT; end
      MWAIT: begin
        if (mult_done) begin
          acc_en   = 1'b1;
          state_nx = last_step ? OUT : MSTART;
        end
      end
      OUT: begin y_valid = 1'b1; state_nx = IDLE; end
      default: state_nx = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      step  <= '0;
    end else begin
      state <= state_nx;
      if (state == S2)  step <= '0;
      else if (acc_en)  step <= last_step ? '0 : step + 1'b1;
    end
  end

  a_one_phase : assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0({ld_ck1, ld_ck2, smp_ck1, smp_ck2}))
    else $error("fir_ctrl: two transfer phases active together");
endmodule
