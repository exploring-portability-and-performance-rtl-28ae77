// Exercises the block sequencer (PAR = 4, BSIZE = 8) for n = 20 (3 blocks,
// 5 chunks) and n = 8 (1 block, 2 chunks), playing the load unit, wavefront
// and store unit: packets are taken at random after each block_go, steps are
// granted at random during the flush, and store_idle is held low for a while
// in the drain. Checks the derived chunk count, one block_go per block with
// the right block index, exactly PAR bubble steps per block, no block_go
// before the store is idle, a single done pulse, busy, and n = 0.
module tb_nw_controller;
  localparam int PAR = 4, BSIZE = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done, block_go, bubble;
  logic pkt_taken = 1'b0, step = 1'b0, store_idle = 1'b1;
  logic [31:0] n = '0, nchunks, block_idx;

  nw_controller #(.PAR(PAR), .BSIZE(BSIZE)) dut (
    .clk, .rst_n, .start, .n, .busy, .done, .nchunks, .block_idx, .block_go,
    .bubble, .pkt_taken, .step, .store_idle
  );

  int checks = 0, failures = 0;
  int gos = 0, bubbles = 0, dones = 0, taken = 0, go_while_busy_store = 0;

  task automatic expect_eq(string what, longint g, longint e);
    checks++;
    if (g != e) begin
      failures++;
      $display("FAIL %s: %0d exp %0d", what, g, e);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (block_go) begin
      expect_eq("block_idx", block_idx, gos);
      gos++;
      if (!store_idle) go_while_busy_store++;
    end
    if (bubble && step) bubbles++;
    if (done) dones++;
    if (pkt_taken) taken++;
  end

  task automatic run(int nn);
    int nch = (nn + PAR - 1) / PAR, nbl = (nn + BSIZE - 1) / BSIZE;
    gos = 0; bubbles = 0; dones = 0; taken = 0;
    @(negedge clk);
    n = nn; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    expect_eq("busy", busy, 1);
    expect_eq("nchunks", nchunks, nch);
    for (int b = 0; b < nbl; b++) begin
      while (!block_go) @(negedge clk);
      @(negedge clk);
      for (int p = 0; p < nch * BSIZE; p++) begin
        while ($urandom_range(2, 0) == 0) @(negedge clk);
        pkt_taken = 1'b1;
        @(negedge clk);
        pkt_taken = 1'b0;
      end
      store_idle = 1'b0;
      while (bubble) begin
        step = ($urandom_range(1, 0) == 1);
        @(negedge clk);
      end
      step = 1'b0;
      repeat (5) @(negedge clk);
      expect_eq("held in drain", busy && !block_go && !done, 1);
      store_idle = 1'b1;
    end
    while (busy) @(negedge clk);
    @(negedge clk);
    expect_eq("block_go count", gos, nbl);
    expect_eq("bubble steps", bubbles, nbl * PAR);
    expect_eq("done pulses", dones, 1);
    expect_eq("packets", taken, nbl * nch * BSIZE);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(20);
    run(8);
    // n = 0: done at once, no block
    gos = 0; dones = 0;
    @(negedge clk);
    n = 0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);
    expect_eq("n=0 done", dones, 1);
    expect_eq("n=0 blocks", gos, 0);
    expect_eq("go before store idle", go_while_busy_store, 0);
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
