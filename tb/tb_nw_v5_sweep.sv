// Runs the kernel at points of the published PAR x BSIZE design space in
// parallel, each on its own memory model with n = 300: every PAR value
// (8, 16, 32, 64) and the smallest and largest BSIZE (256, 8192) as well as
// the default (2048). Each point checks its whole matrix, its step count and
// its cycle count; the results are summed here.
module tb_nw_v5_sweep;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NP = 7;
  logic fin [NP];
  int   chk [NP];
  int   fl  [NP];

  nw_sweep_point #(.PAR(8),  .BSIZE(256))  p0 (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  nw_sweep_point #(.PAR(8),  .BSIZE(8192)) p1 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  nw_sweep_point #(.PAR(16), .BSIZE(256))  p2 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  nw_sweep_point #(.PAR(16), .BSIZE(2048)) p3 (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]));
  nw_sweep_point #(.PAR(32), .BSIZE(256))  p4 (.clk, .rst_n, .finished(fin[4]), .checks(chk[4]), .failures(fl[4]));
  nw_sweep_point #(.PAR(64), .BSIZE(2048)) p5 (.clk, .rst_n, .finished(fin[5]), .checks(chk[5]), .failures(fl[5]));
  nw_sweep_point #(.PAR(64), .BSIZE(8192)) p6 (.clk, .rst_n, .finished(fin[6]), .checks(chk[6]), .failures(fl[6]));

  int checks = 0, failures = 0;

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int i = 0; i < NP; i++) all &= fin[i];
    end while (!all);
    for (int i = 0; i < NP; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    for (int i = 0; i < NP; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
