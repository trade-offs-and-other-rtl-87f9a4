// Classic delay line: a shift register of N+1 delay elements M_0 .. M_N,
// each made of two memory cells, A and B.
//
// The shift is a two-step transfer driven by the two non-overlapping phases
// of a 2-phase clock, given here as enables on one system clock:
//   ck1: M_0.A <= x_in, and M_i.A <= M_{i-1}.B for i = 1 .. N
//        (every sample moves to a temporary cell, freeing the B cells);
//   ck2: M_i.B <= M_i.A for all i.
// After one ck1 followed by one ck2, taps[i] = M_i.B holds x_{n-i}, the
// sample that entered i shifts ago, ready for coefficient h_i. The taps are
// the B cells and change only on ck2. ck1 and ck2 must not be high together
// (checked by an assertion). Cells reset to zero.
module classic_delay_line #(
  parameter int unsigned N = 31,  // filter order: N+1 delay elements
  parameter int unsigned W = 32   // sample width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ck1,
  input  logic               ck2,
  input  logic [W-1:0]       x_in,
  output logic [N:0][W-1:0]  taps
);
  logic [N:0][W-1:0] cell_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_a <= '0;
      taps   <= '0;
    end else begin
      if (ck1) begin
        cell_a[0] <= x_in;
        for (int i = 1; i <= N; i++) cell_a[i] <= taps[i-1];
      end
      if (ck2) taps <= cell_a;
    end
  end

  a_phases : assert property (@(posedge clk) disable iff (!rst_n) !(ck1 && ck2))
    else $error("classic_delay_line: ck1 and ck2 overlap");
endmodule
