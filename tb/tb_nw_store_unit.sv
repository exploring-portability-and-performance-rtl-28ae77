// Pushes 300 random lines (address, data, mask) into the store unit with
// random gaps while the memory side withholds wr_ready at random. Every
// write must come out in order and unchanged, nothing may be lost or
// duplicated, in_ready must drop when the buffer is full, and idle must be
// high exactly when nothing is buffered at the end.
module tb_nw_store_unit;
  import nw_pkg::*;
  localparam int PAR = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, wr_valid, wr_ready = 1'b0, idle;
  addr_t in_addr = '0, wr_addr;
  word_t [PAR-1:0] in_data = '0, wr_data;
  logic [PAR-1:0] in_mask = '0, wr_mask;

  nw_store_unit #(.PAR(PAR), .DEPTH(4)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_addr, .in_data, .in_mask,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_mask, .idle
  );

  typedef struct packed { addr_t a; word_t [PAR-1:0] d; logic [PAR-1:0] m; } line_t;
  line_t q [$];
  int checks = 0, failures = 0, sent = 0, recv = 0, full_seen = 0;

  always @(negedge clk) wr_ready = ($urandom_range(2, 0) == 0);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      q.push_back('{a: in_addr, d: in_data, m: in_mask});
      sent++;
    end
    if (in_valid && !in_ready) full_seen++;
    if (wr_valid && wr_ready) begin
      line_t e;
      checks++;
      if (q.size() == 0) failures++;
      else begin
        e = q.pop_front();
        if (e.a !== wr_addr || e.d !== wr_data || e.m !== wr_mask) begin
          failures++;
          if (failures < 5) $display("FAIL write %0d", recv);
        end
      end
      recv++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (!idle || wr_valid) failures++;
    while (sent < 300) begin
      @(negedge clk);
      in_valid = ($urandom_range(3, 0) != 0);
      in_addr  = $urandom;
      in_data  = {$urandom, $urandom, $urandom, $urandom};
      in_mask  = PAR'($urandom);
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (recv < sent) @(negedge clk);
    checks++;
    if (!idle || q.size() != 0) failures++;
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL: buffer never full"); end
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
