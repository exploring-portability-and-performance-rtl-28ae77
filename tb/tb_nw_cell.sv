// Checks the recurrence element against max(top-gap, left-gap, diag+score)
// computed in the testbench, for random operands (small and full range,
// including wrap-around) and a few hand-picked ties.
module tb_nw_cell;
  import nw_pkg::*;
  word_t top, left, top_left, score, gap, result;
  int checks = 0, failures = 0;

  nw_cell dut (.top, .left, .top_left, .score, .gap, .result);

  function automatic word_t ref_max(word_t t, word_t l, word_t d, word_t s, word_t g);
    word_t a = t - g, b = l - g, c = d + s, m;
    m = (a > b) ? a : b;
    return (c > m) ? c : m;
  endfunction

  task automatic check(word_t t, word_t l, word_t d, word_t s, word_t g);
    top = t; left = l; top_left = d; score = s; gap = g;
    #1;
    checks++;
    if (result !== ref_max(t, l, d, s, g)) begin
      failures++;
      $display("FAIL t=%0d l=%0d d=%0d s=%0d g=%0d -> %0d", t, l, d, s, g, result);
    end
  endtask

  initial begin
    check(0, 0, 0, 0, 0);
    check(-10, -10, 0, 5, 10);      // diagonal wins
    check(100, -10, 0, 5, 10);      // top wins
    check(-10, 100, 0, 5, 10);      // left wins
    check(20, 20, 0, 0, 10);        // tie
    for (int i = 0; i < 2000; i++)
      check($urandom_range(400, 0) - 200, $urandom_range(400, 0) - 200,
            $urandom_range(400, 0) - 200, $urandom_range(10, 0) - 5, $urandom_range(12, 0));
    for (int i = 0; i < 500; i++)
      check($urandom, $urandom, $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
