// MBFA: multi-bit full adder made of W one-bit full adders (fa1) coupled by
// their carry terminals, i.e. a ripple-carry adder.
//
// sum = a + b + cin (W bits), cout is the carry out of the most significant
// 1BFA. Combinational, no clock. W defaults to 8, the width of the
// accumulator prototype; every user sets its own width.
module mbfa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic ci, co;
    if (i == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_bit[i-1].co;
    end
    fa1 u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (ci),
      .sum (sum[i]),
      .cout(co)
    );
  end

  assign cout = g_bit[W-1].co;
endmodule
