// tb_abs_diff: checks the absolute-difference element on all corner values
// and 20000 random pixel pairs against |a-b| computed with integers.
module tb_abs_diff;
  logic [7:0] a, b, d;
  int checks = 0, failures = 0;

  abs_diff dut (.a, .b, .d);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int x, input int y);
    int e;
    a = 8'(x); b = 8'(y);
    #1;
    e = (x > y) ? x - y : y - x;
    checks++;
    if (int'(d) != e) begin
      failures++;
      $display("FAIL: |%0d-%0d| = %0d, expected %0d", x, y, d, e);
    end
  endtask

  initial begin
    try(0, 0); try(255, 0); try(0, 255); try(255, 255); try(128, 127); try(127, 128);
    repeat (20000) try($urandom_range(255), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
