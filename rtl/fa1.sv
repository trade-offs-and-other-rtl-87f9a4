// 1BFA: one-bit full adder, the standard cell from which every adder and
// accumulator of the filter is built.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational; the
// transistor-level cell it stands for is treated as a standard block.
module fa1 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
