// Wavefront datapath of the kernel (one chunk of PAR columns at a time).
//
// Row packets enter one per step: packet T is row r = T mod BSIZE of chunk
// c = T div BSIZE of the current 1D block. It carries the PAR score values of
// that row (one coalesced read), on the block's first row the PAR values of
// the row above the block, and in chunk 0 the matrix's column-0 values.
//
//   read staircase  lane k delayed k steps, so PE k works on packet T-k
//   PE 0..PAR-1     PE k computes row of packet T-k, column c0+k; the PEs
//                   thus hold an anti-diagonal of the chunk
//   column_sr       result/used-top of PE PAR-1 delayed BSIZE-PAR steps,
//                   the left neighbours of PE 0 in the next chunk; in
//                   chunk 0 these come from the packet instead
//   write staircase lane k delayed PAR-1-k steps: a whole row leaves aligned
//   meta line       PAR-deep delay of address/mask/live flag, aligned with it
//
// Because chunks follow each other without a gap, the pipeline wraps from the
// end of one chunk into the start of the next: a block of C chunks takes
// C*BSIZE steps plus PAR bubble steps (`bubble`) to empty the pipeline.
//
// Handshake: a step happens when a packet (in_valid) or a bubble is offered
// and the aligned output row, if there is one, can leave (out_ready). in_ready
// and out_valid/out_ready follow valid/ready rules; a packet is taken when
// in_valid && in_ready. Latency from a packet to its aligned row is PAR steps.
// Requires BSIZE >= PAR.
// The block/chunk/diagonal schedule and the two staircases follow the
// published kernel; the valid/ready stall and the bubble flush are this
// design's own.
module nw_compute
  import nw_pkg::*;
#(
  parameter int unsigned PAR   = PAR_DEFAULT,
  parameter int unsigned BSIZE = BSIZE_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  word_t                 gap,
  // row packet in
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic                  bubble,      // take a step with no packet
  input  word_t [PAR-1:0]       in_score,
  input  word_t [PAR-1:0]       in_top,
  input  word_t                 in_left,
  input  word_t                 in_corner,
  input  logic                  in_row0,
  input  logic                  in_chunk0,
  input  logic                  in_live,     // row lies inside the matrix
  input  addr_t                 in_waddr,
  input  logic  [PAR-1:0]       in_wmask,
  // aligned result row out
  output logic                  out_valid,
  input  logic                  out_ready,
  output word_t [PAR-1:0]       out_data,
  output addr_t                 out_addr,
  output logic  [PAR-1:0]       out_mask,
  // status
  output logic                  step,        // a step is taken this cycle
  output logic                  stalled      // work offered but blocked by out_ready
);

  localparam int unsigned SW = 2 * WORD_W + 1;       // score, top, row0 flag

  typedef struct packed {
    logic  live;
    addr_t addr;
    logic [PAR-1:0] mask;
  } meta_t;

  logic                     have_work;
  logic [PAR-1:0][SW-1:0]   rd_in, rd_out;
  logic [PAR-1:0][WORD_W-1:0] wr_in, wr_out;
  word_t                    pe_out [PAR];
  word_t                    pe_up  [PAR];
  logic [2*WORD_W-1:0]      col_in, col_out;
  word_t                    left_prev;
  word_t                    pe0_left, pe0_top_left;
  meta_t                    meta_in;
  meta_t                    meta [PAR];

  assign have_work = in_valid || bubble;
  assign step      = have_work && (!out_valid || out_ready);
  assign in_ready  = !out_valid || out_ready;
  assign stalled   = have_work && out_valid && !out_ready;

  // Read staircase: score, top and row-0 flag of each lane.
  for (genvar k = 0; k < PAR; k++) begin : g_rd_pack
    assign rd_in[k] = {in_score[k], in_top[k], in_row0 && in_valid};
  end

  staircase_sr #(.LANES(PAR), .W(SW), .REVERSE(1'b0)) u_rd_stair (
    .clk, .rst_n, .en(step), .din(rd_in), .dout(rd_out)
  );

  // Left boundary of PE 0.
  assign col_in = {pe_out[PAR-1], pe_up[PAR-1]};

  column_sr #(.DEPTH(BSIZE - PAR), .W(2 * WORD_W)) u_col_sr (
    .clk, .rst_n, .en(step), .din(col_in), .dout(col_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  left_prev <= '0;
    else if (step && in_valid)   left_prev <= in_left;
  end

  always_comb begin
    if (in_chunk0) begin
      pe0_left     = in_left;
      pe0_top_left = in_row0 ? in_corner : left_prev;
    end else begin
      pe0_left     = col_out[2*WORD_W-1:WORD_W];
      pe0_top_left = col_out[WORD_W-1:0];
    end
  end

  for (genvar k = 0; k < PAR; k++) begin : g_pe
    word_t lft, tl;
    if (k == 0) begin : g_first
      assign lft = pe0_left;
      assign tl  = pe0_top_left;
    end else begin : g_next
      assign lft = pe_out[k-1];
      assign tl  = pe_up[k-1];
    end
    nw_pe u_pe (
      .clk, .rst_n, .en(step), .gap,
      .score     (rd_out[k][SW-1 -: WORD_W]),
      .use_top_in(rd_out[k][0]),
      .top_in    (rd_out[k][WORD_W:1]),
      .left      (lft),
      .top_left  (tl),
      .out_q     (pe_out[k]),
      .up_q      (pe_up[k])
    );
    assign wr_in[k] = pe_out[k];
  end

  // Write staircase.
  staircase_sr #(.LANES(PAR), .W(WORD_W), .REVERSE(1'b1)) u_wr_stair (
    .clk, .rst_n, .en(step), .din(wr_in), .dout(wr_out)
  );

  // Meta line, PAR steps deep.
  assign meta_in = '{live: in_valid && in_live, addr: in_waddr, mask: in_wmask};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(PAR); i++) meta[i] <= '0;
    end else if (step) begin
      meta[0] <= meta_in;
      for (int i = 1; i < int'(PAR); i++) meta[i] <= meta[i-1];
    end
  end

  assign out_valid = meta[PAR-1].live;
  assign out_addr  = meta[PAR-1].addr;
  assign out_mask  = meta[PAR-1].mask;
  for (genvar k = 0; k < PAR; k++) begin : g_out
    assign out_data[k] = wr_out[k];
  end

  initial begin
    assert (BSIZE >= PAR) else $error("nw_compute: BSIZE must be >= PAR");
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_addr));

endmodule
