// Checks both staircase orientations with 5 lanes: after every enabled step,
// lane k of the forward array must show the input given k enabled steps
// earlier and lane k of the reverse array the input given 4-k steps earlier.
// Random data and random enable gaps; a disabled step must hold all lanes.
module tb_staircase_sr;
  localparam int L = 5, W = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [L-1:0][W-1:0] din = '0, fwd, rev;
  logic [L-1:0][W-1:0] hist [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  staircase_sr #(.LANES(L), .W(W), .REVERSE(1'b0)) dut_f (.clk, .rst_n, .en, .din, .dout(fwd));
  staircase_sr #(.LANES(L), .W(W), .REVERSE(1'b1)) dut_r (.clk, .rst_n, .en, .din, .dout(rev));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < L; i++) hist.push_front('0);   // reset state
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      din = {$urandom, $urandom};
      en  = ($urandom_range(2, 0) != 0);
      #1;
      // combinational lanes see the current input
      checks++;
      if (fwd[0] !== din[0] || rev[L-1] !== din[L-1]) failures++;
      @(posedge clk);
      if (en) hist.push_front(din);
      #1;
      for (int k = 1; k < L; k++) begin
        checks++;
        if (fwd[k] !== hist[k-1][k]) begin
          failures++;
          if (failures < 5) $display("FAIL fwd lane %0d", k);
        end
      end
      for (int k = 0; k < L - 1; k++) begin
        checks++;
        if (rev[k] !== hist[L-2-k][k]) begin
          failures++;
          if (failures < 5) $display("FAIL rev lane %0d", k);
        end
      end
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
