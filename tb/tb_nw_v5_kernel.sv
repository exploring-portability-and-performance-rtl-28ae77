// End-to-end test of the accelerator at reduced size (PAR = 4, BSIZE = 8).
//
// For several matrix sizes (several blocks, a last chunk and a last block that
// are only partly inside the matrix, a single element) it initialises the first
// row and column of the substitution matrix to -i*gap in a shared-memory model,
// fills the score matrix with random values, runs the kernel and compares
// every element with a software evaluation of the recurrence. It also checks
// that nothing outside the matrix interior was written. One run uses an ideal
// memory and checks the cycle count against the schedule (one step per cycle
// apart from the extra reads); the others withhold memory readies at random
// and vary the read latency. Each mechanism of the design is counted and must
// occur: wavefront stalls, read backpressure, full read queue, flush bubbles,
// column hand-over between chunks, left column from memory, top row from
// memory, block changes, masked writes and padding rows.
module tb_nw_v5_kernel;
  import nw_pkg::*;

  localparam int PAR   = 4;
  localparam int BSIZE = 8;
  localparam int NMAX  = 40;
  localparam int WORDS = 2 * (NMAX + 1) * (NMAX + 1) + 4 * PAR + 16;
  localparam word_t SENT = 32'sh5A5A_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done;
  logic [31:0] cfg_n = '0;
  word_t cfg_gap = '0;
  addr_t cfg_subst_base = '0, cfg_score_base = '0;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, wr_valid, wr_ready;
  addr_t rd_req_addr, wr_addr;
  logic [1:0] rd_req_tag, rd_rsp_tag;
  word_t [PAR-1:0] rd_rsp_data, wr_data;
  logic [PAR-1:0] wr_mask;
  logic ev_step, ev_stall, ev_bubble, ev_credit_wait;

  nw_v5_kernel #(.PAR(PAR), .BSIZE(BSIZE)) dut (
    .clk, .rst_n, .start, .cfg_n, .cfg_gap, .cfg_subst_base, .cfg_score_base,
    .busy, .done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_tag,
    .rd_rsp_valid, .rd_rsp_data, .rd_rsp_tag,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_mask,
    .ev_step, .ev_stall, .ev_bubble, .ev_credit_wait
  );

  shared_mem_model #(.PAR(PAR), .WORDS(WORDS)) u_mem (
    .clk, .rst_n,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_tag,
    .rd_rsp_valid, .rd_rsp_data, .rd_rsp_tag,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_mask
  );

  int checks = 0, failures = 0;
  int ref_m [NMAX+1][NMAX+1];

  // mechanism counters
  int n_stall = 0, n_rd_bp = 0, n_queue_full = 0, n_bubble = 0, n_handover, n_pad;
  int n_left_mem = 0, n_top_mem = 0, n_block = 0, n_masked = 0;

  // All counted from the kernel's ports: reads by kind, writes, activity flags.
  int n_score = 0, n_writes = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_stall) n_stall++;
    if (rd_req_valid && !rd_req_ready) n_rd_bp++;
    if (ev_credit_wait) n_queue_full++;
    if (ev_bubble) n_bubble++;
    if (rd_req_valid && rd_req_ready) begin
      if (rd_req_tag == 2'd3) n_score++;
      if (rd_req_tag == 2'd2) n_left_mem++;
      if (rd_req_tag == 2'd1) n_top_mem++;
      if (rd_req_tag == 2'd0) n_block++;
    end
    if (wr_valid && wr_ready) n_writes++;
    if (wr_valid && wr_ready && wr_mask != '1) n_masked++;
  end
  // rows of chunks > 0 get their left column through the hand-over line;
  // rows past the matrix end are read but never written
  assign n_handover = n_score - n_left_mem;
  assign n_pad      = n_score - n_writes;

  function automatic int max3(int a, int b, int c);
    int m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction

  task automatic run_case(int n, int gap, int stall_pct, int max_lat, bit check_time);
    int sb, cb, nchunks, nblocks, bad, st0;
    longint t0, cycles, lo, hi;
    sb = 8;
    cb = sb + (n + 1) * (n + 1) + PAR;
    for (int a = 0; a < WORDS; a++) u_mem.mem[a] = SENT;
    for (int i = 0; i <= n; i++)
      for (int j = 0; j <= n; j++) begin
        int s = $urandom_range(10, 0) - 4;
        u_mem.mem[cb + i * (n + 1) + j] = s;
        if (i == 0)      ref_m[i][j] = -j * gap;
        else if (j == 0) ref_m[i][j] = -i * gap;
        else ref_m[i][j] = max3(ref_m[i-1][j] - gap, ref_m[i][j-1] - gap,
                                ref_m[i-1][j-1] + s);
        if (i == 0 || j == 0) u_mem.mem[sb + i * (n + 1) + j] = ref_m[i][j];
      end
    u_mem.stall_pct = stall_pct;
    u_mem.max_lat   = max_lat;
    @(negedge clk);
    cfg_n = n; cfg_gap = gap; cfg_subst_base = sb; cfg_score_base = cb;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = u_mem.cycle;
    st0 = u_mem.rd_stalls + u_mem.wr_stalls;
    while (!done) @(negedge clk);
    cycles = u_mem.cycle - t0;
    bad = 0;
    for (int i = 0; i <= n; i++)
      for (int j = 0; j <= n; j++)
        if (u_mem.mem[sb + i * (n + 1) + j] != ref_m[i][j]) begin
          if (bad < 5) $display("MISMATCH n=%0d [%0d][%0d] got %0d exp %0d", n, i, j,
                                u_mem.mem[sb + i * (n + 1) + j], ref_m[i][j]);
          bad++;
        end
    checks++;
    if (bad != 0) failures++;
    // nothing written outside the matrix
    bad = 0;
    for (int a = 0; a < sb; a++) if (u_mem.mem[a] != SENT) bad++;
    for (int a = sb + (n + 1) * (n + 1); a < cb; a++) if (u_mem.mem[a] != SENT) bad++;
    for (int a = cb + (n + 1) * (n + 1); a < WORDS; a++) if (u_mem.mem[a] != SENT) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL n=%0d: %0d words written outside the matrix", n, bad);
    end
    nchunks = (n + PAR - 1) / PAR;
    nblocks = (n + BSIZE - 1) / BSIZE;
    if (check_time) begin
      lo = longint'(nblocks) * (nchunks * BSIZE + PAR);
      hi = longint'(nblocks) * (nchunks * BSIZE + BSIZE + nchunks + 1 + PAR + 2 * max_lat + 12)
           + (u_mem.rd_stalls + u_mem.wr_stalls - st0);
      checks++;
      if (cycles < lo || cycles > hi) begin
        failures++;
        $display("FAIL n=%0d: %0d cycles, expected %0d..%0d", n, cycles, lo, hi);
      end
    end
    $display("case n=%0d gap=%0d stall=%0d%% lat<=%0d: %0d cycles", n, gap, stall_pct, max_lat, cycles);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_case(21, 10, 0, 1, 1'b1);
    run_case(16, 10, 0, 1, 1'b1);
    run_case(21, 3, 30, 6, 1'b0);
    run_case(NMAX, 5, 20, 4, 1'b0);
    run_case(1, 10, 10, 3, 1'b0);
    run_case(8, 1, 0, 2, 1'b1);
    $display("mechanisms: stall=%0d rd_backpressure=%0d queue_full=%0d bubble=%0d handover=%0d left_mem=%0d top_mem=%0d block=%0d masked_wr=%0d pad_row=%0d",
             n_stall, n_rd_bp, n_queue_full, n_bubble, n_handover, n_left_mem, n_top_mem,
             n_block, n_masked, n_pad);
    checks++; if (n_stall == 0)      begin failures++; $display("FAIL: no wavefront stall"); end
    checks++; if (n_rd_bp == 0)      begin failures++; $display("FAIL: no read backpressure"); end
    checks++; if (n_queue_full == 0) begin failures++; $display("FAIL: read queue never full"); end
    checks++; if (n_bubble == 0)     begin failures++; $display("FAIL: no flush bubble"); end
    checks++; if (n_handover == 0)   begin failures++; $display("FAIL: no column hand-over"); end
    checks++; if (n_left_mem == 0)   begin failures++; $display("FAIL: no left column read"); end
    checks++; if (n_top_mem == 0)    begin failures++; $display("FAIL: no top row read"); end
    checks++; if (n_block < 2)       begin failures++; $display("FAIL: no block change"); end
    checks++; if (n_masked == 0)     begin failures++; $display("FAIL: no masked write"); end
    checks++; if (n_pad == 0)        begin failures++; $display("FAIL: no padding row"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
