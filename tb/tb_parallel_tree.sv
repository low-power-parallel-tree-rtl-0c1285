// tb_parallel_tree: drives the default tree (P = 4 IPEs, 19 broadcast
// window pixels) with a random 16x16 current block and a random 16x19
// window strip, 16 rows with reload on row 0, and checks each IPE's SAD
// against the SAD of the candidate displaced by q columns, computed by the
// testbench. Repeated for 100 blocks; one complete group takes 16 cycles.
module tb_parallel_tree;
  import me_pkg::*;
  localparam int P = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, reload = 1'b0;
  pixel_t [15:0] cur;
  pixel_t [16+P-2:0] sw;
  sad_t [P-1:0] sad_next, sad_q;
  int checks = 0, failures = 0;
  int c_blk [16][16];
  int w_blk [16][16+P-1];

  always #5 clk = ~clk;

  parallel_tree #(.N(16), .P(P)) dut (.clk, .rst_n, .en, .reload, .cur, .sw, .sad_next, .sad_q);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    cur = '0; sw = '0;
    step(); rst_n = 1'b1; step();
    for (int blk = 0; blk < 100; blk++) begin
      for (int l = 0; l < 16; l++) begin
        for (int k = 0; k < 16; k++) c_blk[l][k] = $urandom_range(255);
        for (int k = 0; k < 16+P-1; k++) w_blk[l][k] = $urandom_range(255);
      end
      for (int l = 0; l < 16; l++) begin
        for (int k = 0; k < 16; k++) cur[k] = pixel_t'(c_blk[l][k]);
        for (int k = 0; k < 16+P-1; k++) sw[k] = pixel_t'(w_blk[l][k]);
        en = 1'b1; reload = (l == 0);
        step();
      end
      en = 1'b0;
      for (int q = 0; q < P; q++) begin
        int s;
        s = 0;
        for (int l = 0; l < 16; l++)
          for (int k = 0; k < 16; k++)
            s += (c_blk[l][k] > w_blk[l][k+q]) ? c_blk[l][k] - w_blk[l][k+q] : w_blk[l][k+q] - c_blk[l][k];
        checks++;
        if (int'(sad_q[q]) != s) begin
          failures++;
          $display("FAIL: blk %0d IPE %0d SAD %0d exp %0d", blk, q, sad_q[q], s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
