// Rotation switch between a rotational delay line and the coefficients.
//
// An (N+1) x (N+1) matrix of switches: cell M_j is connected to coefficient
// line i while phase line c is active, for every (i, j, c) with
// j = (c - i) mod (N+1). With wphase one-hot on the cell that received the
// newest sample x_n, line i therefore carries x_{n-i}, the sample that
// coefficient h_i multiplies in y_n = sum h_i x_{n-i}. Each cell thus has one
// switch per phase, and the connection pattern turns by one line per sample.
// Purely combinational.
module rotation_switch #(
  parameter int unsigned N = 31,  // filter order: N+1 cells and lines
  parameter int unsigned W = 32   // sample width
) (
  input  logic [N:0][W-1:0]  cells,
  input  logic [N:0]         wphase,  // one-hot: cell holding the newest sample
  output logic [N:0][W-1:0]  taps     // taps[i] = x_{n-i}
);
  always_comb begin
    taps = '0;
    for (int i = 0; i <= N; i++)
      for (int c = 0; c <= N; c++)
        if (wphase[c]) taps[i] = taps[i] | cells[(c + (N + 1) - i) % (N + 1)];
  end
endmodule
