// Store unit: buffers aligned result rows and writes each one to memory as a
// single coalesced line of PAR words.
//
// in_* is a valid/ready input (in_ready = buffer not full); wr_* is a
// valid/ready write port with a per-word mask. A masked word is not written;
// the mask clears the columns past the end of the matrix in its last chunk.
// A write counts as done when the memory accepts it (wr_valid && wr_ready);
// memory must make an accepted write visible to every later read. idle is
// high when no row is buffered. DEPTH rows of buffering.
// Coalesced row writes follow the published kernel; the buffer, handshake
// and mask are this design's own.
module nw_store_unit
  import nw_pkg::*;
#(
  parameter int unsigned PAR   = PAR_DEFAULT,
  parameter int unsigned DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  addr_t           in_addr,
  input  word_t [PAR-1:0] in_data,
  input  logic  [PAR-1:0] in_mask,
  output logic            wr_valid,
  input  logic            wr_ready,
  output addr_t           wr_addr,
  output word_t [PAR-1:0] wr_data,
  output logic  [PAR-1:0] wr_mask,
  output logic            idle
);

  typedef struct packed {
    addr_t           addr;
    word_t [PAR-1:0] data;
    logic  [PAR-1:0] mask;
  } line_t;

  line_t head, in_line;
  logic  full, empty;

  assign in_line = '{addr: in_addr, data: in_data, mask: in_mask};

  sync_fifo #(.DEPTH(DEPTH), .W($bits(line_t))) u_fifo (
    .clk, .rst_n,
    .push(in_valid && !full), .din(in_line),
    .pop(wr_valid && wr_ready), .dout(head),
    .full, .empty
  );

  assign in_ready = !full;
  assign wr_valid = !empty;
  assign wr_addr  = head.addr;
  assign wr_data  = head.data;
  assign wr_mask  = head.mask;
  assign idle     = empty;

  a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr));

endmodule
