// One point of the PAR x BSIZE design-space sweep, for tb_nw_v5_sweep: a
// kernel with the given parameters, its own shared-memory model, and a run
// that aligns two random sequences of length N, compares the whole matrix
// with a software evaluation of the recurrence and checks the cycle count
// against the schedule (between the pure step count and the step count plus
// the extra first-row and chunk-0 reads, the flushes and memory stalls).
// Reports its result on finished/checks/failures.
module nw_sweep_point
  import nw_pkg::*;
#(
  parameter int PAR   = 8,
  parameter int BSIZE = 256,
  parameter int N     = 300
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int WORDS = 2 * (N + 1) * (N + 1) + 2 * PAR + 16;

  logic start, busy, done;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, wr_valid, wr_ready;
  addr_t rd_req_addr, wr_addr;
  logic [1:0] rd_req_tag, rd_rsp_tag;
  word_t [PAR-1:0] rd_rsp_data, wr_data;
  logic [PAR-1:0] wr_mask;
  logic ev_step, ev_stall, ev_bubble, ev_credit_wait;
  int steps;

  nw_v5_kernel #(.PAR(PAR), .BSIZE(BSIZE)) dut (
    .clk, .rst_n, .start, .cfg_n(N), .cfg_gap(10), .cfg_subst_base(8),
    .cfg_score_base(8 + (N + 1) * (N + 1) + PAR), .busy, .done,
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

  always @(posedge clk) if (rst_n && ev_step) steps++;

  int ref_m [N+1][N+1];

  initial begin
    int sb, cb, bad, nchunks, nblocks, st0;
    longint t0, cycles, lo, hi;
    finished = 1'b0; checks = 0; failures = 0; start = 1'b0; steps = 0;
    sb = 8;
    cb = sb + (N + 1) * (N + 1) + PAR;
    for (int a = 0; a < WORDS; a++) u_mem.mem[a] = 32'sh5A5A_0000;
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++) begin
        int s;
        s = $urandom_range(10, 0) - 4;
        u_mem.mem[cb + i * (N + 1) + j] = s;
        if (i == 0)      ref_m[i][j] = -j * 10;
        else if (j == 0) ref_m[i][j] = -i * 10;
        else begin
          ref_m[i][j] = (ref_m[i-1][j] > ref_m[i][j-1]) ? ref_m[i-1][j] - 10 : ref_m[i][j-1] - 10;
          if (ref_m[i-1][j-1] + s > ref_m[i][j]) ref_m[i][j] = ref_m[i-1][j-1] + s;
        end
        if (i == 0 || j == 0) u_mem.mem[sb + i * (N + 1) + j] = ref_m[i][j];
      end
    u_mem.stall_pct = 5;
    u_mem.max_lat   = 4;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0  = u_mem.cycle;
    st0 = u_mem.rd_stalls + u_mem.wr_stalls;
    while (!done) @(negedge clk);
    cycles = u_mem.cycle - t0;
    bad = 0;
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++)
        if (u_mem.mem[sb + i * (N + 1) + j] != ref_m[i][j]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL PAR=%0d BSIZE=%0d: %0d elements wrong", PAR, BSIZE, bad);
    end
    nchunks = (N + PAR - 1) / PAR;
    nblocks = (N + BSIZE - 1) / BSIZE;
    lo = longint'(nblocks) * (nchunks * BSIZE + PAR);
    hi = longint'(nblocks) * (nchunks * BSIZE + BSIZE + nchunks + 1 + PAR + 20)
         + (u_mem.rd_stalls + u_mem.wr_stalls - st0);
    checks++;
    if (cycles < lo || cycles > hi) begin
      failures++;
      $display("FAIL PAR=%0d BSIZE=%0d: %0d cycles, expected %0d..%0d", PAR, BSIZE, cycles, lo, hi);
    end
    checks++;
    if (steps != nblocks * (nchunks * BSIZE + PAR)) begin
      failures++;
      $display("FAIL PAR=%0d BSIZE=%0d: %0d steps", PAR, BSIZE, steps);
    end
    $display("PAR=%0d BSIZE=%0d n=%0d: %0d cycles for %0d steps (%0d blocks x %0d chunks)",
             PAR, BSIZE, N, cycles, steps, nblocks, nchunks);
    finished = 1'b1;
  end

endmodule
