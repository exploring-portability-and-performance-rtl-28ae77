// Processing element for one column of a PAR-column chunk.
//
// Each enabled step the PE computes the next row of its column: the "top"
// neighbour is its own previous result (out_q), except on the first row of a
// 1D block where it comes from memory (use_top_in/top_in). The left and
// top-left neighbours come from the PE to its left: its out_q is the element
// to the left in the same row, and its up_q (the top value it used) is the
// element above that one. Keeping up_q next to out_q is what lets the
// diagonal wavefront run without a second copy of the previous row.
//
// Timing: result and used-top are registered on `en`; one element per step.
// Reset clears both registers.
// The published kernel states only that PAR elements finish per loop
// iteration; the out_q/up_q arrangement is this design's own.
module nw_pe
  import nw_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t gap,
  input  word_t score,
  input  logic  use_top_in,
  input  word_t top_in,
  input  word_t left,
  input  word_t top_left,
  output word_t out_q,
  output word_t up_q
);

  word_t top, result;

  assign top = use_top_in ? top_in : out_q;

  nw_cell u_cell (
    .top     (top),
    .left    (left),
    .top_left(top_left),
    .score   (score),
    .gap     (gap),
    .result  (result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q <= '0;
      up_q  <= '0;
    end else if (en) begin
      out_q <= result;
      up_q  <= top;
    end
  end

endmodule
