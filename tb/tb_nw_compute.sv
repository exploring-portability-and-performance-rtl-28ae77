// Drives the wavefront datapath directly with row packets (PAR = 4,
// BSIZE = 8) for a 16 x 12 matrix: two 1D blocks of three chunks each. The
// testbench builds every packet from its own copy of the matrix (score row,
// top row on the first row of a block, column 0 in chunk 0), offers them with
// random gaps, ends each block with PAR bubble steps, and applies random
// backpressure on the output. Every output row must carry the right address
// and mask and equal the rows of the reference matrix. It also checks that
// each row leaves exactly PAR steps after its packet entered.
module tb_nw_compute;
  import nw_pkg::*;
  localparam int PAR = 4, BSIZE = 8, ROWS = 16, COLS = 12;
  localparam int NCH = COLS / PAR;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t gap = 7;
  logic in_valid = 1'b0, in_ready, bubble = 1'b0;
  word_t [PAR-1:0] in_score = '0, in_top = '0;
  word_t in_left = '0, in_corner = '0;
  logic in_row0 = 1'b0, in_chunk0 = 1'b0, in_live = 1'b0;
  addr_t in_waddr = '0;
  logic [PAR-1:0] in_wmask = '0;
  logic out_valid, out_ready = 1'b0, step, stalled;
  word_t [PAR-1:0] out_data;
  addr_t out_addr;
  logic [PAR-1:0] out_mask;

  nw_compute #(.PAR(PAR), .BSIZE(BSIZE)) dut (
    .clk, .rst_n, .gap, .in_valid, .in_ready, .bubble, .in_score, .in_top,
    .in_left, .in_corner, .in_row0, .in_chunk0, .in_live, .in_waddr, .in_wmask,
    .out_valid, .out_ready, .out_data, .out_addr, .out_mask, .step, .stalled
  );

  int m [ROWS+1][COLS+1];
  int s [ROWS+1][COLS+1];
  int checks = 0, failures = 0, rows_out = 0, n_stalls = 0;
  int steps = 0;
  int step_in [$];

  // output checker
  always @(posedge clk) if (rst_n) begin
    int i, c0;
    if (stalled) n_stalls++;
    if (step && in_valid) step_in.push_back(steps);
    if (out_valid && step) begin
    i  = int'(out_addr) / 100;
    c0 = int'(out_addr) % 100;
    checks++;
    if (out_mask !== '1) failures++;
    for (int k = 0; k < PAR; k++) begin
      checks++;
      if (out_data[k] !== m[i][c0+k]) begin
        failures++;
        if (failures < 6) $display("FAIL row %0d col %0d: %0d exp %0d", i, c0 + k, out_data[k], m[i][c0+k]);
      end
    end
    // latency: this row entered PAR steps ago
    checks++;
    if (step_in.size() == 0 || steps - step_in[0] != PAR) begin
      failures++;
      $display("FAIL latency");
    end
    if (step_in.size() > 0) void'(step_in.pop_front());
    rows_out++;
    end
    if (step) steps++;
  end

  always @(negedge clk) out_ready = ($urandom_range(3, 0) != 0);

  task automatic offer_packet(int b, int c, int r);
    int i = 1 + b * BSIZE + r, c0 = 1 + c * PAR;
    while ($urandom_range(3, 0) == 0) @(negedge clk);
    in_valid  = 1'b1;
    in_row0   = (r == 0);
    in_chunk0 = (c == 0);
    in_live   = 1'b1;
    in_waddr  = addr_t'(i * 100 + c0);
    in_wmask  = '1;
    for (int k = 0; k < PAR; k++) begin
      in_score[k] = s[i][c0+k];
      in_top[k]   = (r == 0) ? m[i-1][c0+k] : $urandom;
    end
    in_left   = (c == 0) ? m[i][0] : $urandom;
    in_corner = (c == 0 && r == 0) ? m[i-1][0] : $urandom;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    for (int i = 0; i <= ROWS; i++)
      for (int j = 0; j <= COLS; j++) begin
        s[i][j] = $urandom_range(10, 0) - 4;
        // column 0 is random and low except on the rows above each block,
        // which are high, so the corner value decides the first element of
        // every block
        if (j == 0)      m[i][j] = (i % BSIZE == 0) ? 1000 : $urandom_range(200, 0);
        else if (i == 0) m[i][j] = -j * 7;
        else begin
          m[i][j] = (m[i-1][j] > m[i][j-1]) ? m[i-1][j] - 7 : m[i][j-1] - 7;
          if (m[i-1][j-1] + s[i][j] > m[i][j]) m[i][j] = m[i-1][j-1] + s[i][j];
        end
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < ROWS / BSIZE; b++) begin
      for (int c = 0; c < NCH; c++)
        for (int r = 0; r < BSIZE; r++) offer_packet(b, c, r);
      bubble = 1'b1;
      for (int f = 0; f < PAR; f++) begin
        @(posedge clk);
        while (!step) @(posedge clk);
      end
      @(negedge clk);
      bubble = 1'b0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (rows_out != ROWS * NCH) begin
      failures++;
      $display("FAIL: %0d rows out, expected %0d", rows_out, ROWS * NCH);
    end
    checks++;
    if (n_stalls == 0) begin failures++; $display("FAIL: no stall seen"); end
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
