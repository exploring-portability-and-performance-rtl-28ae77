// Load unit: turns the rows of one 1D block into coalesced memory reads and
// reassembles the answers into row packets for the wavefront.
//
// Packets are produced chunk by chunk (c outer, r inner), packet number
// T = c*BSIZE + r, for block row i = 1 + b*BSIZE + r and chunk columns
// c0 .. c0+PAR-1 with c0 = 1 + c*PAR. Each packet costs one to four reads of
// PAR consecutive words, issued in this order:
//   RD_CORNER  subst[R0-1][0]          if r == 0 and c == 0
//   RD_TOP     subst[R0-1][c0 +: PAR]  if r == 0
//   RD_LEFT    subst[i][0]             if c == 0
//   RD_SCORE   score[i][c0 +: PAR]     always, last
// Both matrices are (n+1) x (n+1), row-major, pitch n+1 words. Rows past the
// end of the matrix (last block) are read at row n and marked not live, so no
// read leaves the matrix rows; a line may run up to PAR-1 words past the last
// column, so buffers need that much padding at their end.
//
// Memory side: request valid/ready with a tag (the read kind); responses come
// back in request order, one line per cycle, and are always accepted.
// Each packet is described in a descriptor FIFO when its score read is
// issued; the score response completes it. Reads are only issued while fewer
// than DEPTH packets are in flight (issued and not yet consumed), which
// guarantees room in the packet FIFO for every response.
// The published kernel states only that global-memory accesses are
// coalesced; the read kinds, tags, descriptor FIFO and credits are this
// design's own.
module nw_load_unit
  import nw_pkg::*;
#(
  parameter int unsigned PAR   = PAR_DEFAULT,
  parameter int unsigned BSIZE = BSIZE_DEFAULT,
  parameter int unsigned DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration (stable while a block runs)
  input  logic [31:0]     n,
  input  addr_t           subst_base,
  input  addr_t           score_base,
  input  logic [31:0]     nchunks,
  input  logic [31:0]     block_idx,
  input  logic            block_go,     // pulse: start issuing block block_idx
  output logic            issuing,      // block's reads not all issued yet
  // memory read port
  output logic            rd_req_valid,
  input  logic            rd_req_ready,
  output addr_t           rd_req_addr,
  output rd_kind_e        rd_req_tag,
  input  logic            rd_rsp_valid,
  input  word_t [PAR-1:0] rd_rsp_data,
  input  rd_kind_e        rd_rsp_tag,
  // packets to the wavefront
  output logic            pkt_valid,
  input  logic            pkt_ready,
  output word_t [PAR-1:0] pkt_score,
  output word_t [PAR-1:0] pkt_top,
  output word_t           pkt_left,
  output word_t           pkt_corner,
  output logic            pkt_row0,
  output logic            pkt_chunk0,
  output logic            pkt_live,
  output addr_t           pkt_waddr,
  output logic [PAR-1:0]  pkt_wmask
);

  typedef struct packed {
    logic           row0;
    logic           chunk0;
    logic           live;
    addr_t          waddr;
    logic [PAR-1:0] wmask;
  } desc_t;

  typedef struct packed {
    word_t [PAR-1:0] score;
    word_t [PAR-1:0] top;
    word_t           left;
    word_t           corner;
    desc_t           d;
  } pkt_t;

  localparam int unsigned CW = $clog2(DEPTH + 1);

  // ---------------------------------------------------------------- issue
  logic [31:0] c, r;
  rd_kind_e    kind;
  logic [CW-1:0] inflight;
  logic [31:0] r0, i_row, i_rd, c0, pitch;
  addr_t       row_addr, top_addr;
  desc_t       desc_in;
  logic        req_fire, score_fire, desc_full, desc_empty, desc_pop;
  logic        pkt_fire, last_row, last_chunk;
  logic        pkt_full, pkt_empty, pkt_push;
  pkt_t        pkt_in, pkt_out;
  desc_t       desc_head;

  assign pitch    = n + 32'd1;
  assign r0       = 32'd1 + block_idx * BSIZE;
  assign i_row    = r0 + r;
  assign i_rd     = (i_row > n) ? n : i_row;
  assign c0       = 32'd1 + c * PAR;
  assign row_addr = i_rd * pitch;
  assign top_addr = (r0 - 32'd1) * pitch;

  assign rd_req_valid = issuing && (inflight < CW'(DEPTH));
  assign rd_req_tag   = kind;
  always_comb begin
    unique case (kind)
      RD_CORNER: rd_req_addr = subst_base + top_addr;
      RD_TOP:    rd_req_addr = subst_base + top_addr + c0;
      RD_LEFT:   rd_req_addr = subst_base + row_addr;
      default:   rd_req_addr = score_base + row_addr + c0;
    endcase
  end

  assign req_fire   = rd_req_valid && rd_req_ready;
  assign score_fire = req_fire && kind == RD_SCORE;
  assign last_row   = (r == BSIZE - 1);
  assign last_chunk = (c == nchunks - 1);

  always_comb begin
    desc_in.row0   = (r == 0);
    desc_in.chunk0 = (c == 0);
    desc_in.live   = (i_row <= n);
    desc_in.waddr  = subst_base + i_row * pitch + c0;
    for (int k = 0; k < int'(PAR); k++)
      desc_in.wmask[k] = (i_row <= n) && (c0 + k <= n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      c       <= '0;
      r       <= '0;
      kind    <= RD_CORNER;
    end else if (block_go) begin
      issuing <= 1'b1;
      c       <= '0;
      r       <= '0;
      kind    <= RD_CORNER;
    end else if (req_fire) begin
      unique case (kind)
        RD_CORNER: kind <= RD_TOP;
        RD_TOP:    kind <= (c == 0) ? RD_LEFT : RD_SCORE;
        RD_LEFT:   kind <= RD_SCORE;
        default: begin
          // next packet
          if (last_row) begin
            r <= '0;
            c <= c + 1;
            kind <= RD_TOP;               // row 0 of a chunk > 0
            if (last_chunk) issuing <= 1'b0;
          end else begin
            r <= r + 1;
            kind <= (c == 0) ? RD_LEFT : RD_SCORE;
          end
        end
      endcase
    end
  end

  assign pkt_fire = pkt_valid && pkt_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else if (score_fire && !pkt_fire) inflight <= inflight + 1'b1;
    else if (pkt_fire && !score_fire) inflight <= inflight - 1'b1;
  end

  sync_fifo #(.DEPTH(DEPTH), .W($bits(desc_t))) u_desc_fifo (
    .clk, .rst_n,
    .push(score_fire), .din(desc_in),
    .pop(desc_pop), .dout(desc_head),
    .full(desc_full), .empty(desc_empty)
  );

  // ------------------------------------------------------------- assemble
  word_t [PAR-1:0] st_top;
  word_t           st_left, st_corner;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_top    <= '0;
      st_left   <= '0;
      st_corner <= '0;
    end else if (rd_rsp_valid) begin
      unique case (rd_rsp_tag)
        RD_CORNER: st_corner <= rd_rsp_data[0];
        RD_TOP:    st_top    <= rd_rsp_data;
        RD_LEFT:   st_left   <= rd_rsp_data[0];
        default: ;
      endcase
    end
  end

  assign pkt_push = rd_rsp_valid && rd_rsp_tag == RD_SCORE;
  assign desc_pop = pkt_push;

  always_comb begin
    pkt_in.score  = rd_rsp_data;
    pkt_in.top    = st_top;
    pkt_in.left   = st_left;
    pkt_in.corner = st_corner;
    pkt_in.d      = desc_head;
  end

  sync_fifo #(.DEPTH(DEPTH), .W($bits(pkt_t))) u_pkt_fifo (
    .clk, .rst_n,
    .push(pkt_push), .din(pkt_in),
    .pop(pkt_fire), .dout(pkt_out),
    .full(pkt_full), .empty(pkt_empty)
  );

  assign pkt_valid  = !pkt_empty;
  assign pkt_score  = pkt_out.score;
  assign pkt_top    = pkt_out.top;
  assign pkt_left   = pkt_out.left;
  assign pkt_corner = pkt_out.corner;
  assign pkt_row0   = pkt_out.d.row0;
  assign pkt_chunk0 = pkt_out.d.chunk0;
  assign pkt_live   = pkt_out.d.live;
  assign pkt_waddr  = pkt_out.d.waddr;
  assign pkt_wmask  = pkt_out.d.wmask;

  a_rsp_has_desc: assert property (@(posedge clk) disable iff (!rst_n)
                                   pkt_push |-> !desc_empty && !pkt_full);
  a_desc_room: assert property (@(posedge clk) disable iff (!rst_n)
                                score_fire |-> !desc_full);
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               rd_req_valid && !rd_req_ready && !block_go |=> rd_req_valid && $stable(rd_req_addr));

endmodule
