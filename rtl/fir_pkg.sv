// Shared types of the parallel FIR filter.
//
// fir_arch_e selects how the delay line is paired with the coefficients:
//   ARCH_CLASSIC    - samples shift through a two-cell-per-stage shift register,
//                     coefficients stay fixed (conventional structure).
//   ARCH_ROT_SWITCH - samples stay in a rotational memory, a rotation switch
//                     routes each cell to the coefficient that matches its age.
//   ARCH_ROT_RING   - samples stay in a rotational memory, the coefficients
//                     circulate through a ring memory instead.
// fir_mult_e selects the multiplier: the fully parallel asynchronous binary
// tree, or the serial shift-and-add multiplier with its own accumulator.
package fir_pkg;

  typedef enum logic [1:0] {
    ARCH_CLASSIC    = 2'd0,
    ARCH_ROT_SWITCH = 2'd1,
    ARCH_ROT_RING   = 2'd2
  } fir_arch_e;

  typedef enum logic {
    MULT_TREE   = 1'b0,
    MULT_SERIAL = 1'b1
  } fir_mult_e;

endpackage
