// tb_me_engine: end-to-end test of the motion estimation engine at its
// default parameters (P = 4, 16x16 blocks, search range -16..+15).
//
// A 48x112-pixel reference strip of random texture is generated. For each
// of five macroblocks a current block is cut out of the strip at a known
// displacement and lightly disturbed with noise. Macroblock 0 loads the full
// 48x48 window; macroblocks 1..4 each move the window 16 columns right and
// load only the new strip (reuse), which cycles the strip base through all
// three values. Every macroblock is searched twice: with partial distortion
// elimination off and on. The testbench computes all 1024 SADs itself and
// checks: the reported minimum equals the true minimum, the SAD at the
// reported vector equals that minimum, the search without elimination
// processes exactly 4096 rows in 256 groups with no skip and no stall,
// so it takes exactly 4096 cycles, the search with
// elimination gives the same minimum in fewer rows, and search time equals
// rows plus stall cycles. The input stream is throttled at random.
// It counts how often each mechanism occurred (skip, full load, reuse load,
// stall, elimination off) and fails for
// any that never did.
module tb_me_engine;
  import me_pkg::*;

  localparam int FW = 112;
  localparam int NMB = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, reuse, pde_en, in_valid, in_ready, busy, done, skip;
  mv_t  nb_a, nb_b, nb_c, best_mv;
  sad_t min_sad;
  pixel_t [STRIP_W-1:0] in_data;
  logic [15:0] rows_cnt, grp_cnt, skip_cnt, stall_cnt;

  me_engine dut (
    .clk, .rst_n, .start, .reuse, .pde_en, .nb_mv_a(nb_a), .nb_mv_b(nb_b), .nb_mv_c(nb_c),
    .in_valid, .in_ready, .in_data, .busy, .done, .skip, .best_mv, .min_sad,
    .rows_cnt, .grp_cnt, .skip_cnt, .stall_cnt
  );

  int checks = 0, failures = 0;
  int n_skip = 0, n_full = 0, n_reuse = 0, n_stall = 0, n_nopde = 0, n_pred_first = 0;

  byte unsigned frame [48][FW];
  byte unsigned cb    [16][16];
  int           noise [51][FW+3];
  int           sad_ref [32][32];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // advance one clock; drive and sample just after the edge
  task automatic step();
    @(posedge clk);
    #1;
  endtask

  task automatic send_beat(input pixel_t [STRIP_W-1:0] d);
    while ($urandom_range(3) == 0) begin
      in_valid = 1'b0;
      step();
    end
    in_valid = 1'b1;
    in_data  = d;
    forever begin
      bit acc;
      acc = in_ready;     // in_ready is stable between edges
      step();
      if (acc) break;
    end
    in_valid = 1'b0;
  endtask

  // Run one macroblock: window columns wx..wx+47 of the frame.
  task automatic run_mb(input int wx, input bit use_reuse, input bit pde, input mv_t pa,
                        input mv_t pb, input mv_t pc, output int search_cycles);
    pixel_t [STRIP_W-1:0] d;
    int t0;
    step();
    start = 1'b1; reuse = use_reuse; pde_en = pde;
    nb_a = pa; nb_b = pb; nb_c = pc;
    step();
    start = 1'b0;
    while (!in_ready) step();
    for (int r = 0; r < 16; r++) begin
      for (int c = 0; c < 16; c++) d[c] = cb[r][c];
      send_beat(d);
    end
    for (int r = 0; r < 48; r++) begin
      for (int s = (use_reuse ? 2 : 0); s < 3; s++) begin
        for (int c = 0; c < 16; c++) d[c] = frame[r][wx + s*16 + c];
        send_beat(d);
      end
    end
    t0 = 0;
    while (!done) begin
      step();
      t0++;
    end
    search_cycles = t0;
  endtask

  initial begin : main
    int wx, tx, ty, best, cyc0, cyc1, rows0;
    mv_t pa, pb, pc;
    sad_t min0;
    start = 0; reuse = 0; pde_en = 0; in_valid = 0; in_data = '0;
    nb_a = '0; nb_b = '0; nb_c = '0;
    // smooth texture: 4x4 box filter over white noise
    for (int r = 0; r < 51; r++)
      for (int c = 0; c < FW + 3; c++)
        noise[r][c] = $urandom_range(255);
    for (int r = 0; r < 48; r++)
      for (int c = 0; c < FW; c++) begin
        int acc;
        acc = 0;
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 4; b++)
            acc += noise[r+a][c+b];
        frame[r][c] = byte'(acc / 16);
      end
    repeat (3) step();
    rst_n = 1'b1;

    for (int mb = 0; mb < NMB; mb++) begin
      wx = 16 * mb;
      tx = $urandom_range(31) - 16;
      ty = $urandom_range(31) - 16;
      for (int l = 0; l < 16; l++)
        for (int k = 0; k < 16; k++) begin
          int v;
          v = int'(frame[16 + ty + l][wx + 16 + tx + k]) + $urandom_range(6) - 3;
          cb[l][k] = byte'((v < 0) ? 0 : (v > 255) ? 255 : v);
        end
      best = 1 << 30;
      for (int j = -16; j < 16; j++)
        for (int i = -16; i < 16; i++) begin
          int s;
          s = 0;
          for (int l = 0; l < 16; l++)
            for (int k = 0; k < 16; k++) begin
              int a, b;
              a = int'(cb[l][k]);
              b = int'(frame[16 + j + l][wx + 16 + i + k]);
              s += (a > b) ? a - b : b - a;
            end
          sad_ref[j+16][i+16] = s;
          if (s < best) best = s;
        end
      // neighbours: two near the true motion, one far away; the median
      // lands on the true motion in mb 0, 2 and 4, elsewhere on (0,0)
      pa.x = (mb % 2 == 0) ? mvc_t'(tx) : mvc_t'(0);
      pa.y = (mb % 2 == 0) ? mvc_t'(ty) : mvc_t'(0);
      pb.x = (mb % 2 == 0) ? mvc_t'(tx) : mvc_t'(-16); pb.y = (mb % 2 == 0) ? mvc_t'(ty) : mvc_t'(15);
      pc.x = mvc_t'(15); pc.y = mvc_t'(-16);

      // without partial distortion elimination
      run_mb(wx, mb != 0, 1'b0, pa, pb, pc, cyc0);
      if (mb == 0) n_full++; else n_reuse++;
      n_nopde++;
      check(int'(min_sad) == best, $sformatf("mb%0d noPDE min_sad %0d exp %0d", mb, min_sad, best));
      check(sad_ref[int'(best_mv.y)+16][int'(best_mv.x)+16] == int'(min_sad),
            $sformatf("mb%0d noPDE SAD at mv (%0d,%0d) is %0d", mb, best_mv.x, best_mv.y,
                      sad_ref[int'(best_mv.y)+16][int'(best_mv.x)+16]));
      check(rows_cnt == 16'd4096, $sformatf("mb%0d noPDE rows %0d exp 4096", mb, rows_cnt));
      check(grp_cnt == 16'd256, $sformatf("mb%0d noPDE groups %0d exp 256", mb, grp_cnt));
      check(skip_cnt == 16'd0, $sformatf("mb%0d noPDE skips %0d", mb, skip_cnt));
      check(stall_cnt == 16'd0 && cyc0 == 4096,
            $sformatf("mb%0d noPDE search took %0d cycles, %0d stalls; exp 4096, 0", mb, cyc0, stall_cnt));
      check(cyc0 == int'(rows_cnt) + int'(stall_cnt),
            $sformatf("mb%0d noPDE cycles %0d rows %0d stalls %0d", mb, cyc0, rows_cnt, stall_cnt));
      min0 = min_sad;
      rows0 = int'(rows_cnt);

      // same block again with elimination: the window is reloaded in full
      run_mb(wx, 1'b0, 1'b1, pa, pb, pc, cyc1);
      n_full++;
      check(min_sad == min0, $sformatf("mb%0d PDE min_sad %0d exp %0d", mb, min_sad, min0));
      check(sad_ref[int'(best_mv.y)+16][int'(best_mv.x)+16] == int'(min_sad),
            $sformatf("mb%0d PDE SAD at mv mismatch", mb));
      check(int'(rows_cnt) < rows0, $sformatf("mb%0d PDE rows %0d not below %0d", mb, rows_cnt, rows0));
      check(cyc1 == int'(rows_cnt) + int'(stall_cnt),
            $sformatf("mb%0d PDE cycles %0d rows %0d stalls %0d", mb, cyc1, rows_cnt, stall_cnt));
      if (skip_cnt != 0) n_skip++;
      if (stall_cnt != 0) n_stall++;
      $display("mb%0d true (%0d,%0d) found (%0d,%0d) sad %0d  noPDE rows %0d  PDE rows %0d skips %0d stalls %0d",
               mb, tx, ty, int'(best_mv.x), int'(best_mv.y), min_sad, rows0, rows_cnt, skip_cnt, stall_cnt);
    end

    check(n_skip > 0,   "mechanism: PDE skip never happened");
    check(n_full > 0,   "mechanism: full window load never happened");
    check(n_reuse > 0,  "mechanism: strip reuse load never happened");
    check(n_nopde > 0,  "mechanism: search without PDE never happened");
    check(n_stall > 0,  "mechanism: scanner stall never happened");
    $display("mechanisms: skip=%0d full=%0d reuse=%0d nopde=%0d stall=%0d",
             n_skip, n_full, n_reuse, n_nopde, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
