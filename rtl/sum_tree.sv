// Output summing block (Sigma): adds NIN two's complement words in parallel.
//
// Each input is sign-extended to the output width W + ceil(log2 NIN), so the
// sum cannot overflow. Purely combinational (an asynchronous adder), used to
// add the products of the multipliers that work at the same time.
module sum_tree #(
  parameter int unsigned NIN = 32,  // number of inputs
  parameter int unsigned W   = 64   // input width
) (
  input  logic [NIN-1:0][W-1:0]                     in,
  output logic [W+$clog2(NIN > 1 ? NIN : 2)-1:0]    sum
);
  localparam int unsigned OW = W + $clog2(NIN > 1 ? NIN : 2);

  always_comb begin
    sum = '0;
    for (int i = 0; i < NIN; i++)
      sum = sum + OW'(signed'(in[i]));
  end
endmodule
