// Kernel controller: runs the 1D blocks of the matrix one after another.
//
// On `start` it latches the matrix size n and derives the loop bounds (the
// exit condition of the kernel loop): nchunks = ceil(n/PAR) chunks per block
// and nblocks = ceil(n/BSIZE) blocks. For each block it
//   GO     pulses block_go so the load unit starts reading the block,
//   RUN    waits until the wavefront has taken nchunks*BSIZE packets,
//   FLUSH  offers PAR bubble steps, which push the last rows out of the
//          pipeline and the write staircase,
//   DRAIN  waits until the store unit has written everything,
// because the first row of the next block reads the last row of this one
// from memory. After the last block it pulses `done` for one cycle. busy is
// high from the cycle after start until done.
// The published kernel computes its exit condition on the host; deriving
// the bounds from n here, and draining between blocks, are this design's
// choices.
module nw_controller
  import nw_pkg::*;
#(
  parameter int unsigned PAR   = PAR_DEFAULT,
  parameter int unsigned BSIZE = BSIZE_DEFAULT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] n,
  output logic        busy,
  output logic        done,
  output logic [31:0] nchunks,
  output logic [31:0] block_idx,
  output logic        block_go,
  output logic        bubble,
  input  logic        pkt_taken,   // the wavefront took a packet
  input  logic        step,        // the wavefront took a step
  input  logic        store_idle
);

  typedef enum logic [2:0] {S_IDLE, S_GO, S_RUN, S_FLUSH, S_DRAIN} state_e;

  state_e      state;
  logic [31:0] nblocks, taken, flushed, pkts_per_block;

  assign pkts_per_block = nchunks * BSIZE;
  assign busy     = (state != S_IDLE);
  assign block_go = (state == S_GO);
  assign bubble   = (state == S_FLUSH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      nchunks   <= '0;
      nblocks   <= '0;
      block_idx <= '0;
      taken     <= '0;
      flushed   <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nchunks   <= (n + PAR - 1) / PAR;
          nblocks   <= (n + BSIZE - 1) / BSIZE;
          block_idx <= '0;
          state     <= (n == 0) ? S_IDLE : S_GO;
          done      <= (n == 0);
        end
        S_GO: begin
          taken <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (pkt_taken) begin
            taken <= taken + 1;
            if (taken + 1 == pkts_per_block) begin
              flushed <= '0;
              state   <= S_FLUSH;
            end
          end
        end
        S_FLUSH: begin
          if (step) begin
            flushed <= flushed + 1;
            if (flushed + 1 == PAR) state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (store_idle) begin
            if (block_idx + 1 == nblocks) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              block_idx <= block_idx + 1;
              state     <= S_GO;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
