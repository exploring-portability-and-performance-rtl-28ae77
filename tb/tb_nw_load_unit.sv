// Runs the load unit against the shared-memory model (PAR = 4, BSIZE = 8,
// n = 10: three chunks per block, two blocks, the second with padding rows)
// with random read backpressure, random latency and a randomly stalling packet
// consumer. For every packet it checks, against the memory contents and the
// expected order (chunk by chunk, row by row), the score line, the top row on
// first rows, the column-0 value in chunk 0, the corner on the first packet,
// the flags, the write address and the column/row mask. It also checks the
// number of reads of each kind and that no more than DEPTH packets are ever
// in flight.
module tb_nw_load_unit;
  import nw_pkg::*;
  localparam int PAR = 4, BSIZE = 8, N = 10, DEPTH = 3;
  localparam int NCH = (N + PAR - 1) / PAR;
  localparam int SB = 16, CB = 400, WORDS = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic block_go = 1'b0, issuing;
  logic [31:0] block_idx = '0;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid;
  addr_t rd_req_addr;
  rd_kind_e rd_req_tag;
  logic [1:0] rsp_tag;
  word_t [PAR-1:0] rd_rsp_data, pkt_score, pkt_top;
  logic pkt_valid, pkt_ready = 1'b0, pkt_row0, pkt_chunk0, pkt_live;
  word_t pkt_left, pkt_corner;
  addr_t pkt_waddr;
  logic [PAR-1:0] pkt_wmask;
  logic wr_ready_unused;
  word_t [PAR-1:0] wr_data_unused = '0;

  nw_load_unit #(.PAR(PAR), .BSIZE(BSIZE), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .n(N), .subst_base(SB), .score_base(CB), .nchunks(NCH),
    .block_idx, .block_go, .issuing,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_tag,
    .rd_rsp_valid, .rd_rsp_data, .rd_rsp_tag(rd_kind_e'(rsp_tag)),
    .pkt_valid, .pkt_ready, .pkt_score, .pkt_top, .pkt_left, .pkt_corner,
    .pkt_row0, .pkt_chunk0, .pkt_live, .pkt_waddr, .pkt_wmask
  );

  shared_mem_model #(.PAR(PAR), .WORDS(WORDS)) u_mem (
    .clk, .rst_n, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_tag(rd_req_tag),
    .rd_rsp_valid, .rd_rsp_data, .rd_rsp_tag(rsp_tag),
    .wr_valid(1'b0), .wr_ready(wr_ready_unused), .wr_addr('0), .wr_data(wr_data_unused),
    .wr_mask('0)
  );

  int checks = 0, failures = 0, got = 0, inflight_max = 0, inflight = 0;
  int n_kind [4] = '{0, 0, 0, 0};

  function automatic word_t w(int a);
    return u_mem.mem[a];
  endfunction

  task automatic expect_eq(string what, longint g, longint e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 8) $display("FAIL packet %0d %s: %0d exp %0d", got, what, g, e);
    end
  endtask

  always @(negedge clk) pkt_ready = ($urandom_range(2, 0) != 0);

  always @(posedge clk) if (rst_n) begin
    if (rd_req_valid && rd_req_ready) begin
      n_kind[rd_req_tag]++;
      if (rd_req_tag == RD_SCORE) inflight++;
    end
    if (pkt_valid && pkt_ready) inflight--;
    if (inflight > inflight_max) inflight_max = inflight;
  end

  always @(posedge clk) if (rst_n && pkt_valid && pkt_ready) begin
    int b, t, c, r, i, c0, ir;
    b  = got / (NCH * BSIZE);
    t  = got % (NCH * BSIZE);
    c  = t / BSIZE;
    r  = t % BSIZE;
    i  = 1 + b * BSIZE + r;
    c0 = 1 + c * PAR;
    ir = (i > N) ? N : i;
    expect_eq("row0", pkt_row0, r == 0);
    expect_eq("chunk0", pkt_chunk0, c == 0);
    expect_eq("live", pkt_live, i <= N);
    expect_eq("waddr", pkt_waddr, SB + i * (N + 1) + c0);
    for (int k = 0; k < PAR; k++) begin
      expect_eq("score", pkt_score[k], w(CB + ir * (N + 1) + c0 + k));
      expect_eq("mask", pkt_wmask[k], (i <= N) && (c0 + k <= N));
      if (r == 0) expect_eq("top", pkt_top[k], w(SB + (i - 1) * (N + 1) + c0 + k));
    end
    if (c == 0) expect_eq("left", pkt_left, w(SB + ir * (N + 1)));
    if (c == 0 && r == 0) expect_eq("corner", pkt_corner, w(SB + (i - 1) * (N + 1)));
    got++;
  end

  initial begin
    for (int a = 0; a < WORDS; a++) u_mem.mem[a] = a * 3 + 1;
    u_mem.stall_pct = 25;
    u_mem.max_lat   = 5;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 2; b++) begin
      @(negedge clk);
      block_idx = b;
      block_go  = 1'b1;
      @(negedge clk);
      block_go  = 1'b0;
      while (got < (b + 1) * NCH * BSIZE) @(negedge clk);
    end
    expect_eq("packets", got, 2 * NCH * BSIZE);
    expect_eq("corner reads", n_kind[RD_CORNER], 2);
    expect_eq("top reads", n_kind[RD_TOP], 2 * NCH);
    expect_eq("left reads", n_kind[RD_LEFT], 2 * BSIZE);
    expect_eq("score reads", n_kind[RD_SCORE], 2 * NCH * BSIZE);
    checks++;
    if (inflight_max > DEPTH || inflight_max < 2) begin
      failures++;
      $display("FAIL in flight max %0d", inflight_max);
    end
    checks++;
    if (issuing) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
