// Rotational delay line: N+1 sample cells M_0 .. M_N that are never shifted.
//
// A new sample is written only into the cell whose phase line sel[i] is high
// (sel is one-hot, from an (N+1)-phase generator) when we = 1; the sample
// then stays in place until the same phase comes round again N+1 samples
// later. cells[i] is the content of M_i, updated one clock edge after the
// write. Which cell holds x_{n-i} depends on the phase, so a rotation switch
// or circulating coefficients must pair the cells with the coefficients.
// Cells reset to zero.
module rot_delay_line #(
  parameter int unsigned N = 31,  // filter order: N+1 cells
  parameter int unsigned W = 32   // sample width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [N:0]         sel,
  input  logic [W-1:0]       x_in,
  output logic [N:0][W-1:0]  cells
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cells <= '0;
    else if (we) begin
      for (int i = 0; i <= N; i++)
        if (sel[i]) cells[i] <= x_in;
    end
  end

  a_sel : assert property (@(posedge clk) disable iff (!rst_n) we |-> $onehot(sel))
    else $error("rot_delay_line: write phase not one-hot");
endmodule
