// Shared types and defaults for the Needleman-Wunsch "kernel version 5"
// accelerator: a diagonal-wavefront array that fills the substitution matrix
// of a global sequence alignment.
//
// Matrix elements are 32-bit signed integers, as in the C reference
// algorithm. Memory is addressed in 32-bit words. The default PAR/BSIZE pair
// (32, 2048) is the best-performing configuration reported for the CPU+FPGA
// package; both are powers of two in every configuration that was evaluated.
package nw_pkg;

  parameter int WORD_W        = 32;
  parameter int ADDR_W        = 32;
  parameter int PAR_DEFAULT   = 32;    // columns processed per loop iteration
  parameter int BSIZE_DEFAULT = 2048;  // rows in one 1D block

  typedef logic signed [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0]        addr_t;

  // Kind of a coalesced read; echoed back with the response as its tag.
  // Within one row packet the reads are always issued in this order, so the
  // score read is the last one of every packet.
  typedef enum logic [1:0] {
    RD_CORNER = 2'd0,  // subst[R0-1][0]           (first row of chunk 0 only)
    RD_TOP    = 2'd1,  // subst[R0-1][c0 +: PAR]   (first row of each chunk)
    RD_LEFT   = 2'd2,  // subst[i][0]              (every row of chunk 0)
    RD_SCORE  = 2'd3   // score[i][c0 +: PAR]      (every row)
  } rd_kind_e;

endpackage
