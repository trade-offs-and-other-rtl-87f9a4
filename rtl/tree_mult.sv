// Fully parallel, asynchronous binary-tree multiplier: p = A * B.
//
// A is the K-bit coefficient, B the L-bit signal sample (L a power of two).
// Layer 0 forms the L partial products A AND b_j with one row of K AND gates
// per bit of B. Layer m (m = 1 .. log2 L) adds pairs of results of layer m-1
// with one MBFA each, the upper operand shifted left by 2^(m-1) bits; layer m
// has L/2^m MBFAs of K + 2^m one-bit adders, so the last layer is a single
// K+L-bit MBFA whose output is the product. No clock: the result settles
// combinationally.
//
// fill selects how A is read. fill = 0: A and B unsigned. fill = 1: A is two's
// complement (B stays unsigned). The top connects fill to the sign bit of the
// coefficient. Every operand of every layer is widened with the extension bit
// fill AND (operand MSB), which zero-extends unsigned and sign-extends signed
// values, so p is the exact product, two's complement when fill = 1.
// The layer widths follow the structure the filter design derives for this
// tree (lengths growing by 4, 8, 16, ... over K in the later layers); the
// first layer uses K+2 rather than K+1 adders so that its result is correct
// for signed A as well.
module tree_mult #(
  parameter int unsigned K = 32,  // width of A (coefficient)
  parameter int unsigned L = 32   // width of B (sample), power of two, >= 2
) (
  input  logic [K-1:0]   a,
  input  logic [L-1:0]   b,
  input  logic           fill,
  output logic [K+L-1:0] p
);
  localparam int unsigned LAYERS = $clog2(L);

  // g_lvl[m].res[j]: result j of layer m, K + 2^m bits (layer 0: K + 1).
  for (genvar m = 0; m <= LAYERS; m++) begin : g_lvl
    localparam int unsigned WM = (m == 0) ? K + 1 : K + (1 << m);
    logic [WM-1:0] res [L >> m];

    if (m == 0) begin : g_and
      // AND-gate partial products A AND b_j, with their extension bit.
      for (genvar j = 0; j < L; j++) begin : g_pp
        assign res[j] = {fill & a[K-1] & b[j], a & {K{b[j]}}};
      end
    end else begin : g_add
      localparam int unsigned WP = (m == 1) ? K + 1 : K + (1 << (m - 1));
      localparam int unsigned SH = WM - WP;       // shift of the upper input: 2^(m-1)
      for (genvar j = 0; j < (L >> m); j++) begin : g_node
        logic [WP-1:0] lo, hi;
        logic [WM-1:0] op_lo, op_hi;
        logic [WM-1:0] s;
        logic          unused_cout;
        assign lo    = g_lvl[m-1].res[2*j];
        assign hi    = g_lvl[m-1].res[2*j+1];
        assign op_lo = {{(WM-WP){fill & lo[WP-1]}}, lo};
        assign op_hi = {hi, {SH{1'b0}}};  // WM = WP + SH: hi fills the top
        mbfa #(.W(WM)) u_mbfa (
          .a   (op_lo),
          .b   (op_hi),
          .cin (1'b0),
          .sum (s),
          .cout(unused_cout)
        );
        assign res[j] = s;
      end
    end
  end

  assign p = g_lvl[LAYERS].res[0];
endmodule
