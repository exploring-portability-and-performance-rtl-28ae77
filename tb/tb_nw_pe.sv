// Drives one processing element down a column: the first row takes its top
// from top_in, later rows from the PE's own last result. Random left and
// top-left values, random enable gaps; checks out_q (the element) and up_q
// (the top value used) after every enabled step, and that a disabled step
// changes nothing.
module tb_nw_pe;
  import nw_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, use_top_in = 1'b0;
  word_t gap = 10, score = 0, top_in = 0, left = 0, top_left = 0, out_q, up_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  nw_pe dut (.clk, .rst_n, .en, .gap, .score, .use_top_in, .top_in, .left,
             .top_left, .out_q, .up_q);

  word_t exp_out = 0, exp_up = 0;

  function automatic word_t ref_max(word_t t, word_t l, word_t d, word_t s, word_t g);
    word_t a = t - g, b = l - g, c = d + s, m;
    m = (a > b) ? a : b;
    return (c > m) ? c : m;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (out_q !== 0 || up_q !== 0) failures++;
    for (int i = 0; i < 1000; i++) begin
      word_t t;
      @(negedge clk);
      en         = ($urandom_range(3, 0) != 0);
      use_top_in = ($urandom_range(7, 0) == 0);
      top_in     = $urandom_range(200, 0) - 100;
      left       = $urandom_range(200, 0) - 100;
      top_left   = $urandom_range(200, 0) - 100;
      score      = $urandom_range(10, 0) - 5;
      gap        = $urandom_range(10, 1);
      t = use_top_in ? top_in : exp_out;
      if (en) begin
        exp_out = ref_max(t, left, top_left, score, gap);
        exp_up  = t;
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_q !== exp_out || up_q !== exp_up) begin
        failures++;
        if (failures < 5) $display("FAIL step %0d: out %0d/%0d up %0d/%0d", i, out_q, exp_out, up_q, exp_up);
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
