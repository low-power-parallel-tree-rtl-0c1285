// tb_decision_unit: feeds the decision unit (P = 4) the growing partial
// SADs of 400 candidate groups, row by row, the way the controller does:
// a group ends after its 16th row or in the first row where skip is high.
// A reference model in the testbench keeps its own recent minimum R and
// best vector and predicts, every row, skip (smallest partial SAD larger
// than R, elimination enabled, not the last row) and update (smallest
// final SAD below R; lowest IPE index wins a tie). R and the best vector
// are compared after every edge. Elimination is switched off for some
// groups, and init is pulsed halfway to restart the search.
module tb_decision_unit;
  import me_pkg::*;
  localparam int P = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, init = 1'b0, pde_en = 1'b1, last_row = 1'b0;
  sad_t [P-1:0] sad;
  mvc_t grp_x, grp_y;
  logic skip, update;
  sad_t min_sad;
  mv_t  best_mv;
  int checks = 0, failures = 0, n_skip = 0, n_upd = 0;

  always #5 clk = ~clk;

  decision_unit #(.P(P)) dut (.clk, .rst_n, .en, .init, .pde_en, .last_row, .sad, .grp_x, .grp_y,
                              .skip, .update, .min_sad, .best_mv);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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
    int r_ref, bx, by, acc[P], mn, mi, gx, gy, lim;
    bit e_skip, e_upd;
    sad = '0; grp_x = '0; grp_y = '0;
    step(); rst_n = 1'b1;
    init = 1'b1; step(); init = 1'b0;
    r_ref = 65535; bx = 0; by = 0;
    for (int g = 0; g < 400; g++) begin
      if (g == 200) begin
        init = 1'b1; step(); init = 1'b0;
        r_ref = 65535; bx = 0; by = 0;
        check(int'(min_sad) == 65535, "init reloads R");
      end
      gx = 4 * $urandom_range(7) - 16;
      gy = $urandom_range(31) - 16;
      grp_x = mvc_t'(gx); grp_y = mvc_t'(gy);
      pde_en = (g % 10 != 3);
      lim = (g % 9 == 0) ? 20 - (g % 200) / 12 : $urandom_range(40) + 24;
      for (int q = 0; q < P; q++) acc[q] = 0;
      for (int r = 0; r < 16; r++) begin
        for (int q = 0; q < P; q++) begin
          acc[q] += $urandom_range(lim);
          if (g % 5 == 0 && q == 3) acc[q] = acc[0];      // ties
          sad[q] = sad_t'(acc[q]);
        end
        mn = acc[0]; mi = 0;
        for (int q = 1; q < P; q++) if (acc[q] < mn) begin mn = acc[q]; mi = q; end
        last_row = (r == 15);
        en = 1'b1;
        e_skip = pde_en && (r != 15) && (mn > r_ref);
        e_upd  = (r == 15) && (mn < r_ref);
        #1;
        check(skip == e_skip, $sformatf("g%0d r%0d skip %0d exp %0d (min %0d R %0d)", g, r, skip, e_skip, mn, r_ref));
        check(update == e_upd, $sformatf("g%0d r%0d update %0d exp %0d", g, r, update, e_upd));
        step();
        if (e_upd) begin r_ref = mn; bx = gx + mi; by = gy; n_upd++; end
        check(int'(min_sad) == r_ref, $sformatf("g%0d R %0d exp %0d", g, min_sad, r_ref));
        check(int'(best_mv.x) == bx && int'(best_mv.y) == by,
              $sformatf("g%0d mv (%0d,%0d) exp (%0d,%0d)", g, int'(best_mv.x), int'(best_mv.y), bx, by));
        if (e_skip) begin n_skip++; break; end
      end
      en = 1'b0;
    end
    check(n_skip > 0 && n_upd > 4, "both skip and update exercised");
    $display("skips %0d updates %0d", n_skip, n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
