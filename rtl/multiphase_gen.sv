// Multi-phase clock generator: PHASES one-hot phase lines ck_0 .. ck_{PHASES-1}.
//
// Exactly one line of phase is high. Each clock edge with adv = 1 passes the
// active phase to the next line, from the last back to the first, the way the
// phases of the rotational memory follow one another. idx is the number of
// the active phase. Reset activates phase 0. With PHASES = N+1 = 32 (the
// default, a 32-coefficient filter) it drives the rotational delay line; with
// PHASES = L it is the l-phase clock of the serial multiplier. Each phase is
// realised as an enable on the one system clock, not as a separate clock.
module multiphase_gen #(
  parameter int unsigned PHASES = 32
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clr,   // back to phase 0
  input  logic                              adv,   // step to the next phase
  output logic [PHASES-1:0]                 phase,
  output logic [$clog2(PHASES > 1 ? PHASES : 2)-1:0] idx
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      phase <= PHASES'(1);
    else if (clr)    phase <= PHASES'(1);
    else if (adv)    phase <= {phase[PHASES-2:0], phase[PHASES-1]};
  end

  always_comb begin
    idx = '0;
    for (int i = 0; i < PHASES; i++)
      if (phase[i]) idx = idx | i[$bits(idx)-1:0];
  end

  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot(phase))
    else $error("multiphase_gen: phase lines not one-hot");
endmodule
