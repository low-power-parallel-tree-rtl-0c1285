// tb_addr_gen_ctrl: runs the controller (P = 4) together with the spiral
// scanner through four macroblocks: a full window load, then three reuse
// loads that rotate the strip base through 1, 2 and 0. The testbench plays
// the decision unit: it raises skip in row 1 + (g mod 7) of every third
// group g (only with elimination enabled), and checks:
//   * load: current-block rows 0..15 written in order, window strips
//     written at (row, (base + logical strip) mod 3), 144 or 48 beats;
//   * search: every active cycle addresses current row r, window row gy+r,
//     mask column 4*gx, reloads on row 0, flags row 15, enables the tree,
//     RAMs and decision unit only then, and reports group displacements
//     (4*gx-16, gy-16);
//   * the first group of a search is the one holding the predicted vector
//     (5,-4): candidates x = 4..7, y = -4;
//   * rows, groups and skips counted by the controller equal the
//     testbench's own counts; without elimination 4096 rows in 256 groups
//     and no stall cycle;
//   * search time equals rows plus stall cycles, then one done cycle.
module tb_addr_gen_ctrl;
  import me_pkg::*;
  localparam int P = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, reuse = 1'b0, pde_en_in = 1'b0, busy, done, in_valid = 1'b0, in_ready;
  mv_t pred_mv;
  pixel_t [15:0] in_data, wdata;
  logic cb_we, sw_we, ram_re, tree_en, reload, dec_en, dec_init, pde_en, last_row, skip;
  logic [3:0] cb_waddr, cb_raddr;
  logic [5:0] sw_wrow, sw_rrow, mask_col, sp_cx, sp_cy, sp_gx, sp_gy;
  logic [1:0] sw_wstrip, strip_base;
  mvc_t grp_x, grp_y;
  logic sp_start, sp_take, sp_valid, sp_last;
  logic [15:0] rows_cnt, grp_cnt, skip_cnt, stall_cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  addr_gen_ctrl #(.N(16), .SP(16), .P(P)) dut (
    .clk, .rst_n, .start, .reuse, .pde_en_in, .pred_mv, .busy, .done,
    .in_valid, .in_ready, .in_data,
    .cb_we, .cb_waddr, .cb_raddr,
    .sw_we, .sw_wrow, .sw_wstrip, .sw_rrow, .strip_base, .mask_col, .wdata, .ram_re,
    .tree_en, .reload, .dec_en, .dec_init, .pde_en, .last_row, .grp_x, .grp_y, .skip,
    .sp_start, .sp_cx, .sp_cy, .sp_take, .sp_valid, .sp_gx, .sp_gy, .sp_last,
    .rows_cnt, .grp_cnt, .skip_cnt, .stall_cnt
  );

  spiral_scan #(.GX(8), .GY(32)) u_scan (
    .clk, .rst_n, .start(sp_start), .cx(sp_cx), .cy(sp_cy), .take(sp_take),
    .valid(sp_valid), .gx(sp_gx), .gy(sp_gy), .last(sp_last)
  );

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(); @(posedge clk); #1; endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Testbench-side skip rule, evaluated on the current controller outputs.
  int g_idx, row_m;
  always_comb skip = pde_en && dec_en && (g_idx % 3 == 1) && (row_m == 1 + g_idx % 7);

  task automatic run(bit use_reuse, bit pde, int exp_base);
    int beats, nrow, ngrp, nskip, cyc, stalls, nxt_row, nxt_g;
    bit first;
    pred_mv.x = 5; pred_mv.y = -4;
    start = 1'b1; reuse = use_reuse; pde_en_in = pde;
    step();
    start = 1'b0;
    check(strip_base == 2'(exp_base), $sformatf("strip base %0d exp %0d", strip_base, exp_base));
    // load
    beats = 0;
    while (beats < (use_reuse ? 64 : 160)) begin
      in_valid = 1'b1;
      for (int k = 0; k < 16; k++) in_data[k] = pixel_t'($urandom_range(255));
      check(in_ready, "ready during load");
      #1;
      if (beats < 16) begin
        check(cb_we && !sw_we && int'(cb_waddr) == beats, $sformatf("cb write beat %0d", beats));
      end else begin
        int s, r, ls;
        s  = beats - 16;
        r  = use_reuse ? s : s / 3;
        ls = use_reuse ? 2 : s % 3;
        check(sw_we && !cb_we && int'(sw_wrow) == r && int'(sw_wstrip) == (exp_base + ls) % 3,
              $sformatf("sw write beat %0d: row %0d strip %0d exp %0d %0d", beats, sw_wrow, sw_wstrip, r, (exp_base + ls) % 3));
      end
      check(wdata == in_data, "write data");
      step();
      beats++;
    end
    in_valid = 1'b0;
    check(!in_ready, "not ready after load");
    // search
    g_idx = 0; row_m = 0; nrow = 0; ngrp = 0; nskip = 0; cyc = 0; stalls = 0; first = 1'b1;
    while (!done && cyc < 10000) begin
      #1;
      if (dec_en) begin
        check(tree_en && ram_re, "enables together");
        check(int'(cb_raddr) == row_m && int'(sw_rrow) == int'(sp_gy) + row_m, "row addresses");
        check(int'(mask_col) == 4 * int'(sp_gx), "mask column");
        check(int'(grp_x) == 4 * int'(sp_gx) - 16 && int'(grp_y) == int'(sp_gy) - 16, "group vector");
        check(reload == (row_m == 0) && last_row == (row_m == 15), "reload / last row");
        if (first) begin
          check(int'(grp_x) == 4 && int'(grp_y) == -4, $sformatf("first group (%0d,%0d)", int'(grp_x), int'(grp_y)));
          first = 1'b0;
        end
        nrow++;
        if (row_m == 0) ngrp++;
        if (skip || row_m == 15) begin
          if (skip) nskip++;
          nxt_row = 0; nxt_g = g_idx + 1;
        end else begin
          nxt_row = row_m + 1; nxt_g = g_idx;
        end
      end else begin
        check(!tree_en && !ram_re, "idle units disabled");
        stalls++;
        nxt_row = row_m; nxt_g = g_idx;
      end
      step();
      row_m = nxt_row; g_idx = nxt_g;   // model state moves with the clock edge
      cyc++;
    end
    check(done, "done reached");
    check(int'(rows_cnt) == nrow && int'(grp_cnt) == ngrp && int'(skip_cnt) == nskip,
          $sformatf("counters rows %0d/%0d groups %0d/%0d skips %0d/%0d", rows_cnt, nrow, grp_cnt, ngrp, skip_cnt, nskip));
    check(ngrp == 256, $sformatf("groups %0d", ngrp));
    check(cyc == nrow + stalls && int'(stall_cnt) == stalls, "time = rows + stalls");
    if (!pde) check(nrow == 4096 && nskip == 0 && stalls == 0, $sformatf("rows without elimination %0d, stalls %0d", nrow, stalls));
    else      check(nskip > 0 && nrow < 4096, $sformatf("rows with elimination %0d", nrow));
    step();
    check(!busy && !done, "back to idle");
    $display("search: rows %0d groups %0d skips %0d stalls %0d", nrow, ngrp, nskip, stalls);
  endtask

  initial begin
    in_data = '0; pred_mv = '0;
    step(); rst_n = 1'b1; step();
    run(1'b0, 1'b0, 0);
    run(1'b1, 1'b1, 1);
    run(1'b1, 1'b0, 2);
    run(1'b1, 1'b1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
