// window_comparator: decides whether a CUT input vector belongs to the
// active window.
//
// The n-bit input vector is split into k = n - w high-order bits and w
// low-order bits. The active window is the set of 2^w vectors whose k
// high-order bits equal the current state of the test generator; this block
// compares the two k-bit values and raises cmp on equality. It is purely
// combinational. The split and the equality test follow the method; the
// explicit enable input (used to mask the comparison while the cells are
// being cleared) is this design's own addition.
module window_comparator #(
  parameter int unsigned K = 12          // compared width, n - w
) (
  input  logic         en,               // comparison allowed this cycle
  input  logic [K-1:0] vec_high,         // k high-order bits of the CUT input
  input  logic [K-1:0] tg_state,         // current test generator state
  output logic         cmp               // vector lies in the active window
);

  always_comb cmp = en && (vec_high == tg_state);

endmodule
