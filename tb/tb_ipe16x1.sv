// tb_ipe16x1: runs 200 random 16x16 candidate blocks through one 16x1 IPE,
// one row per cycle with reload on the first row, and checks after every
// row that acc_next and, one edge later, the accumulator equal the running
// SAD computed by the testbench. A complete SAD therefore takes 16 cycles.
// Between blocks it drops the enable for a few cycles and checks that the
// accumulator holds.
module tb_ipe16x1;
  import me_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, reload = 1'b0;
  pixel_t [15:0] cur, sw;
  sad_t acc_next, acc_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ipe16x1 dut (.clk, .rst_n, .en, .reload, .cur, .sw, .acc_next, .acc_q);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(); @(posedge clk); #1; endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int sad, rowsum, cyc;
    cur = '0; sw = '0;
    step(); rst_n = 1'b1; step();
    for (int blk = 0; blk < 200; blk++) begin
      sad = 0;
      cyc = 0;
      for (int r = 0; r < 16; r++) begin
        rowsum = 0;
        for (int k = 0; k < 16; k++) begin
          cur[k] = pixel_t'((blk % 3 == 0) ? 255 : $urandom_range(255));
          sw[k]  = pixel_t'((blk % 3 == 0) ? 0   : $urandom_range(255));
          rowsum += (cur[k] > sw[k]) ? cur[k] - sw[k] : sw[k] - cur[k];
        end
        en = 1'b1; reload = (r == 0);
        sad += rowsum;
        #1;
        check(int'(acc_next) == sad, $sformatf("blk %0d row %0d acc_next %0d exp %0d", blk, r, acc_next, sad));
        step();
        cyc++;
        check(int'(acc_q) == sad, $sformatf("blk %0d row %0d acc %0d exp %0d", blk, r, acc_q, sad));
      end
      check(cyc == 16, "one SAD per 16 cycles");
      en = 1'b0; reload = 1'b1;
      for (int k = 0; k < 16; k++) cur[k] = pixel_t'($urandom_range(255));
      repeat (2) step();
      check(int'(acc_q) == sad, $sformatf("blk %0d hold with en low: %0d exp %0d", blk, acc_q, sad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
