// ACU: accumulator made of an MBFA and a clocked memory block.
//
// The MBFA adds the addend to the stored word; the memory block (a register
// of W cells) takes the MBFA result on every clock edge with en = 1. clr has
// priority and loads zero, so a new accumulation starts with clr. acc is the
// stored word; it changes one cycle after en/clr. Overflow wraps modulo 2^W:
// users size W so that their sums fit. The prototype this follows was 8 bits
// wide, hence the default W = 8. The memory cells of the prototype were
// dynamic (charge on gate capacitance); here they are ordinary flip-flops,
// reset to zero.
module acu #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] addend,
  output logic [W-1:0] acc
);
  logic [W-1:0] sum;
  logic         unused_cout;

  mbfa #(.W(W)) u_mbfa (
    .a   (acc),
    .b   (addend),
    .cin (1'b0),
    .sum (sum),
    .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= sum;
  end
endmodule
