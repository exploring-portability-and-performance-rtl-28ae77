// Checks the column delay line at depths 7, 1 and 0: once filled, dout must
// equal the din given exactly DEPTH enabled steps earlier; random data and
// random enable gaps.
module tb_column_sr;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0, d7, d1, d0;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  column_sr #(.DEPTH(7), .W(W)) dut7 (.clk, .rst_n, .en, .din, .dout(d7));
  column_sr #(.DEPTH(1), .W(W)) dut1 (.clk, .rst_n, .en, .din, .dout(d1));
  column_sr #(.DEPTH(0), .W(W)) dut0 (.clk, .rst_n, .en, .din, .dout(d0));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      din = W'($urandom);
      en  = ($urandom_range(3, 0) != 0);
      #1;
      checks++;
      if (d0 !== din) failures++;
      if (hist.size() >= 7) begin
        checks++;
        if (d7 !== hist[6]) begin
          failures++;
          if (failures < 5) $display("FAIL depth 7 step %0d: %h exp %h", i, d7, hist[6]);
        end
      end
      if (hist.size() >= 1) begin
        checks++;
        if (d1 !== hist[0]) failures++;
      end
      @(posedge clk);
      if (en) hist.push_front(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
