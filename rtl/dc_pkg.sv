// dc_pkg: types and default sizes shared by the difference-cut neural element.
//
// A difference cut (DC) is the array that remains after the smallest
// remaining element has been subtracted from every remaining element.
// Repeating this until all elements are zero yields, cycle by cycle, the
// minimum q_j and the number b_j of elements still above zero; their product
// q_j*b_j is a partial sum, and the partial sums add up to the sum of the
// original array. The constants below are the default sizes: N = 24 elements
// is the largest array size used in the document's study of the method; the
// word widths are this design's own choice.
package dc_pkg;

  // Default number of elements in one cut (largest array size studied).
  localparam int unsigned N_DEF  = 24;
  // Default input and weight widths (unsigned); products are XW+WW bits.
  localparam int unsigned XW_DEF = 8;
  localparam int unsigned WW_DEF = 8;
  localparam int unsigned AW_DEF = XW_DEF + WW_DEF;

  // What a run of the processor produces.
  //   MODE_THRESHOLD: stop as soon as the running threshold difference
  //                   Delta_j = theta - (S_1+...+S_j) reaches zero or below.
  //   MODE_FULL:      process every cut, giving the full sum, the sorted
  //                   array and the restored first array.
  typedef enum logic {
    MODE_THRESHOLD = 1'b0,
    MODE_FULL      = 1'b1
  } dc_mode_e;

endpackage
