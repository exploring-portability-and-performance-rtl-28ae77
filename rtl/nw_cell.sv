// One element of the Needleman-Wunsch recurrence (purely combinational):
//
//   result = max(top - gap, left - gap, top_left + score)
//
// top, left and top_left are the already computed neighbours of the element
// in the substitution matrix, score is the similarity of the two residues and
// gap the gap penalty. Arithmetic is two's complement and wraps like the C
// `int` of the reference algorithm; no saturation is applied. On a tie the
// value is the same whichever operand wins, so no priority is needed.
// The recurrence is the published algorithm's; plain wrapping 32-bit
// arithmetic is this implementation's choice.
module nw_cell
  import nw_pkg::*;
(
  input  word_t top,
  input  word_t left,
  input  word_t top_left,
  input  word_t score,
  input  word_t gap,
  output word_t result
);

  word_t from_top, from_left, from_diag, best_gap;

  always_comb begin
    from_top  = top - gap;
    from_left = left - gap;
    from_diag = top_left + score;
    best_gap  = (from_top > from_left) ? from_top : from_left;
    result    = (from_diag > best_gap) ? from_diag : best_gap;
  end

endmodule
