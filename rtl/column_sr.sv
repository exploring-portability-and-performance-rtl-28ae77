// Column delay line between consecutive chunks.
//
// Delays a W-bit value by exactly DEPTH enabled steps. In the wavefront it
// carries the last column of one chunk (result and used-top of the rightmost
// PE) to the leftmost PE, which needs it BSIZE-PAR steps later for the same
// row of the next chunk. Logically it is a shift register; it is built as a
// circular buffer (one memory of DEPTH words and a pointer) so that a depth of
// a few thousand costs one RAM rather than thousands of register moves.
//
// Timing: dout comes from a register loaded by the RAM's synchronous read
// and equals the din that was presented DEPTH enabled steps earlier. The buffer content is not reset: for
// the first DEPTH steps after reset dout is undefined, and the wavefront does
// not read it then (chunk 0 takes its left column from memory). DEPTH = 0
// gives a wire.
// The published kernel keeps these values in shift registers sized by BSIZE
// and PAR; the circular-buffer form is this design's choice.
module column_sr #(
  parameter int unsigned DEPTH = 2016,
  parameter int unsigned W     = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_ram
    localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    logic [W-1:0]  mem [DEPTH];
    logic [PW-1:0] ptr, ptr_next;
    logic [W-1:0]  q;

    assign ptr_next = (ptr == PW'(DEPTH-1)) ? '0 : ptr + 1'b1;
    assign dout     = q;

    // Synchronous read of the entry that the next step will overwrite; it
    // is never the entry written in the same step, so the array maps onto
    // a simple dual-port block RAM.
    always_ff @(posedge clk) begin
      if (en) begin
        mem[ptr] <= din;
        q        <= (DEPTH == 1) ? din : mem[ptr_next];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  ptr <= '0;
      else if (en) ptr <= ptr_next;
    end
  end

endmodule
