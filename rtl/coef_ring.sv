// Circular coefficient memory: N+1 positions M_0 .. M_N, each a pair of
// memory cells A and B, connected in a ring M_0 -> M_1 -> ... -> M_N -> M_0.
//
// The coefficients are rewritten from position to position with the same
// two-step transfer as the classic delay line, on the phases of a 2-phase
// clock (given as enables):
//   ck1: M_0.A <= (load ? h_in : M_N.B), M_i.A <= M_{i-1}.B for i >= 1;
//   ck2: M_i.B <= M_i.A.
// With load = 1 a coefficient enters from h_in (filling the ring takes N+1
// such shifts); with load = 0 the ring rotates by one position. coefs[i] is
// M_i.B, the fixed output h_out_i, and changes only on ck2. Cells reset to
// zero.
module coef_ring #(
  parameter int unsigned N = 31,  // filter order: N+1 coefficients
  parameter int unsigned W = 32   // coefficient width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ck1,
  input  logic               ck2,
  input  logic               load,
  input  logic [W-1:0]       h_in,
  output logic [N:0][W-1:0]  coefs
);
  logic [N:0][W-1:0] cell_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_a <= '0;
      coefs  <= '0;
    end else begin
      if (ck1) begin
        cell_a[0] <= load ? h_in : coefs[N];
        for (int i = 1; i <= N; i++) cell_a[i] <= coefs[i-1];
      end
      if (ck2) coefs <= cell_a;
    end
  end

  a_phases : assert property (@(posedge clk) disable iff (!rst_n) !(ck1 && ck2))
    else $error("coef_ring: ck1 and ck2 overlap");
endmodule
