// tb_mv_predictor: checks the median-of-three motion vector predictor on
// random vectors over the full -16..+15 range (and on equal values),
// comparing each component with the middle value found by ordering tests.
module tb_mv_predictor;
  import me_pkg::*;
  mv_t a, b, c, p;
  int checks = 0, failures = 0;

  mv_predictor dut (.mv_a(a), .mv_b(b), .mv_c(c), .mv_pred(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int med(int x, int y, int z);
    // the value that is neither strictly the smallest nor the largest
    if ((x <= y && y <= z) || (z <= y && y <= x)) return y;
    if ((y <= x && x <= z) || (z <= x && x <= y)) return x;
    return z;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int ax, ay, bx, by, cx, cy;
      ax = $urandom_range(31) - 16; ay = $urandom_range(31) - 16;
      bx = (n % 7 == 0) ? ax : $urandom_range(31) - 16; by = $urandom_range(31) - 16;
      cx = $urandom_range(31) - 16; cy = (n % 5 == 0) ? by : $urandom_range(31) - 16;
      a.x = mvc_t'(ax); a.y = mvc_t'(ay);
      b.x = mvc_t'(bx); b.y = mvc_t'(by);
      c.x = mvc_t'(cx); c.y = mvc_t'(cy);
      #1;
      checks++;
      if (int'(p.x) != med(ax, bx, cx) || int'(p.y) != med(ay, by, cy)) begin
        failures++;
        $display("FAIL: median of (%0d,%0d) (%0d,%0d) (%0d,%0d) gave (%0d,%0d)",
                 ax, ay, bx, by, cx, cy, int'(p.x), int'(p.y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
