// Needleman-Wunsch "kernel version 5" accelerator (top level).
//
// Fills the (n+1) x (n+1) substitution matrix of a global alignment in shared
// memory, given its initialised first row and column and the score matrix:
//   subst[i][j] = max(subst[i-1][j] - gap, subst[i][j-1] - gap,
//                     subst[i-1][j-1] + score[i][j])
// The matrix is cut into 1D blocks of BSIZE rows; each block is swept in
// chunks of PAR columns by PAR processing elements standing on an
// anti-diagonal, so every step finishes PAR elements. Staircase shift
// registers turn coalesced row reads into the diagonal order and back into
// coalesced row writes; a column delay line hands the right edge of one
// chunk to the next. See nw_compute for the datapath and nw_load_unit for the
// memory reads.
//
// Host interface: set cfg_* and pulse start; done pulses when the matrix is
// complete. cfg_subst_base/cfg_score_base are word addresses of element [0][0]
// of each matrix, pitch n+1 words; both buffers must be readable PAR-1 words
// past their end. Memory: a read port (request valid/ready + tag, in-order
// responses that are always accepted) and a masked write port (valid/ready).
// ev_* are single-cycle activity flags for performance counters.
// Timing: at best one step (PAR elements) per clock once the packet queue is
// full; rows of chunk 0 need two reads and first rows of a chunk one extra, so
// with a one-line-per-cycle read port a block of C chunks takes about
// C*BSIZE + BSIZE + C + PAR cycles plus memory latency.
// Architecture, PAR/BSIZE and their defaults follow the published kernel;
// the memory ports, handshakes, host registers and activity flags are this
// design's own.
module nw_v5_kernel
  import nw_pkg::*;
#(
  parameter int unsigned PAR      = PAR_DEFAULT,
  parameter int unsigned BSIZE    = BSIZE_DEFAULT,
  parameter int unsigned RD_DEPTH = 8,
  parameter int unsigned WR_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // host control
  input  logic            start,
  input  logic [31:0]     cfg_n,
  input  word_t           cfg_gap,
  input  addr_t           cfg_subst_base,
  input  addr_t           cfg_score_base,
  output logic            busy,
  output logic            done,
  // shared-memory read port
  output logic            rd_req_valid,
  input  logic            rd_req_ready,
  output addr_t           rd_req_addr,
  output logic [1:0]      rd_req_tag,
  input  logic            rd_rsp_valid,
  input  word_t [PAR-1:0] rd_rsp_data,
  input  logic [1:0]      rd_rsp_tag,
  // shared-memory write port
  output logic            wr_valid,
  input  logic            wr_ready,
  output addr_t           wr_addr,
  output word_t [PAR-1:0] wr_data,
  output logic  [PAR-1:0] wr_mask,
  // activity, one pulse per cycle, for performance counters
  output logic            ev_step,         // wavefront step (PAR elements)
  output logic            ev_stall,        // wavefront held by the write side
  output logic            ev_bubble,       // flush step at the end of a block
  output logic            ev_credit_wait   // read held: packet queue full
);

  logic [31:0] n_q;
  word_t       gap_q;
  addr_t       subst_base_q, score_base_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q          <= '0;
      gap_q        <= '0;
      subst_base_q <= '0;
      score_base_q <= '0;
    end else if (start && !busy) begin
      n_q          <= cfg_n;
      gap_q        <= cfg_gap;
      subst_base_q <= cfg_subst_base;
      score_base_q <= cfg_score_base;
    end
  end

  logic [31:0] nchunks, block_idx;
  logic        block_go, bubble, issuing;
  logic        pkt_valid, pkt_ready, pkt_row0, pkt_chunk0, pkt_live;
  word_t [PAR-1:0] pkt_score, pkt_top;
  word_t       pkt_left, pkt_corner;
  addr_t       pkt_waddr;
  logic [PAR-1:0] pkt_wmask;
  logic        row_valid, row_ready, step, stalled, store_idle;
  word_t [PAR-1:0] row_data;
  addr_t       row_addr;
  logic [PAR-1:0] row_mask;
  rd_kind_e    req_tag;

  nw_controller #(.PAR(PAR), .BSIZE(BSIZE)) u_ctrl (
    .clk, .rst_n,
    .start(start && !busy), .n(cfg_n),
    .busy, .done, .nchunks, .block_idx, .block_go, .bubble,
    .pkt_taken(pkt_valid && pkt_ready), .step, .store_idle
  );

  nw_load_unit #(.PAR(PAR), .BSIZE(BSIZE), .DEPTH(RD_DEPTH)) u_load (
    .clk, .rst_n,
    .n(n_q), .subst_base(subst_base_q), .score_base(score_base_q),
    .nchunks, .block_idx, .block_go, .issuing,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_tag(req_tag),
    .rd_rsp_valid, .rd_rsp_data, .rd_rsp_tag(rd_kind_e'(rd_rsp_tag)),
    .pkt_valid, .pkt_ready,
    .pkt_score, .pkt_top, .pkt_left, .pkt_corner,
    .pkt_row0, .pkt_chunk0, .pkt_live, .pkt_waddr, .pkt_wmask
  );

  assign rd_req_tag     = req_tag;
  assign ev_step        = step;
  assign ev_stall       = stalled;
  assign ev_bubble      = bubble && step;
  assign ev_credit_wait = issuing && !rd_req_valid;

  nw_compute #(.PAR(PAR), .BSIZE(BSIZE)) u_compute (
    .clk, .rst_n, .gap(gap_q),
    .in_valid(pkt_valid), .in_ready(pkt_ready), .bubble,
    .in_score(pkt_score), .in_top(pkt_top),
    .in_left(pkt_left), .in_corner(pkt_corner),
    .in_row0(pkt_row0), .in_chunk0(pkt_chunk0), .in_live(pkt_live),
    .in_waddr(pkt_waddr), .in_wmask(pkt_wmask),
    .out_valid(row_valid), .out_ready(row_ready),
    .out_data(row_data), .out_addr(row_addr), .out_mask(row_mask),
    .step, .stalled
  );

  nw_store_unit #(.PAR(PAR), .DEPTH(WR_DEPTH)) u_store (
    .clk, .rst_n,
    .in_valid(row_valid && step), .in_ready(row_ready),
    .in_addr(row_addr), .in_data(row_data), .in_mask(row_mask),
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_mask,
    .idle(store_idle)
  );

endmodule
