// tb_spiral_scan: checks the group scan order on the default 8x32 group
// grid for the four corners, the centre and 20 random start groups.
// The expected order is built independently: walk every ring around the
// start without clipping (top row left to right, right column down, bottom
// row right to left, left column up) and drop the positions outside the
// grid. The scanner's output must match it position for position, start
// with the start group, cover all 256 groups once and flag only the last
// one. The consumer takes positions with random pauses.
module tb_spiral_scan;
  localparam int GX = 8, GY = 32;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, take = 1'b0;
  logic [5:0] cx, cy, gx, gy;
  logic valid, last;
  int checks = 0, failures = 0;
  int ex[$], ey[$];

  always #5 clk = ~clk;

  spiral_scan #(.GX(GX), .GY(GY)) dut (.clk, .rst_n, .start, .cx, .cy, .take, .valid, .gx, .gy, .last);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(); @(posedge clk); #1; endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void push(int x, int y);
    if (x >= 0 && x < GX && y >= 0 && y < GY) begin ex.push_back(x); ey.push_back(y); end
  endfunction

  task automatic build(int sx, int sy);
    ex.delete(); ey.delete();
    push(sx, sy);
    for (int k = 1; k < 64; k++) begin
      for (int x = sx - k; x <= sx + k; x++)        push(x, sy - k);
      for (int y = sy - k + 1; y <= sy + k; y++)    push(sx + k, y);
      for (int x = sx + k - 1; x >= sx - k; x--)    push(x, sy + k);
      for (int y = sy + k - 1; y >= sy - k + 1; y--) push(sx - k, y);
    end
  endtask

  task automatic run(int sx, int sy);
    int n, guard;
    bit seen [GX][GY];
    build(sx, sy);
    check(ex.size() == GX * GY, "reference order covers the grid");
    foreach (seen[i, j]) seen[i][j] = 1'b0;
    cx = 6'(sx); cy = 6'(sy);
    start = 1'b1; step(); start = 1'b0;
    n = 0; guard = 0;
    while (n < GX * GY && guard < 10000) begin
      guard++;
      take = valid && ($urandom_range(4) != 0);
      if (take) begin
        check(int'(gx) == ex[n] && int'(gy) == ey[n],
              $sformatf("start (%0d,%0d) #%0d got (%0d,%0d) exp (%0d,%0d)", sx, sy, n, gx, gy, ex[n], ey[n]));
        check(!seen[gx[2:0]][gy[4:0]], "position repeated");
        seen[gx[2:0]][gy[4:0]] = 1'b1;
        check(last == (n == GX * GY - 1), $sformatf("last flag at #%0d", n));
        n++;
      end
      step();
      take = 1'b0;
    end
    check(n == GX * GY, $sformatf("start (%0d,%0d): %0d positions", sx, sy, n));
    repeat (3) step();
    check(!valid, "nothing after the last position");
  endtask

  initial begin
    cx = '0; cy = '0;
    step(); rst_n = 1'b1; step();
    run(0, 0); run(GX-1, 0); run(0, GY-1); run(GX-1, GY-1); run(GX/2, GY/2);
    repeat (20) run($urandom_range(GX-1), $urandom_range(GY-1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
