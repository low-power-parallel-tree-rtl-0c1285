// tb_me_parallelism: the same search run on engines with parallelism 1
// and 16 (the other two configurations the parallelism comparison uses;
// P = 4 is covered by the default-size test). Both engines receive the
// same stream in lock step. Three macroblocks of smooth random texture
// with known displacement are searched without and with partial
// distortion elimination. Checks: without elimination P = 1 processes
// 16384 rows in 1024 groups and P = 16 processes 1024 rows in 64 groups;
// both report the true minimum SAD, a vector whose SAD is that minimum,
// and with elimination the same minimum in fewer rows.
module tb_me_parallelism;
  import me_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, reuse, pde_en, in_valid;
  mv_t  nb_a, nb_b, nb_c;
  pixel_t [STRIP_W-1:0] in_data;
  logic in_ready1, in_ready16, busy1, busy16, done1, done16, skip1, skip16;
  mv_t  mv1, mv16;
  sad_t sad1, sad16;
  logic [15:0] rows1, grp1, skp1, stl1, rows16, grp16, skp16, stl16;

  me_engine #(.P(1)) dut1 (
    .clk, .rst_n, .start, .reuse, .pde_en, .nb_mv_a(nb_a), .nb_mv_b(nb_b), .nb_mv_c(nb_c),
    .in_valid, .in_ready(in_ready1), .in_data, .busy(busy1), .done(done1), .skip(skip1),
    .best_mv(mv1), .min_sad(sad1), .rows_cnt(rows1), .grp_cnt(grp1), .skip_cnt(skp1), .stall_cnt(stl1)
  );
  me_engine #(.P(16)) dut16 (
    .clk, .rst_n, .start, .reuse, .pde_en, .nb_mv_a(nb_a), .nb_mv_b(nb_b), .nb_mv_c(nb_c),
    .in_valid, .in_ready(in_ready16), .in_data, .busy(busy16), .done(done16), .skip(skip16),
    .best_mv(mv16), .min_sad(sad16), .rows_cnt(rows16), .grp_cnt(grp16), .skip_cnt(skp16), .stall_cnt(stl16)
  );

  int checks = 0, failures = 0;
  byte unsigned frame [48][48];
  byte unsigned cb    [16][16];
  int           noise [51][51];
  int           sad_ref [32][32];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_beat(input pixel_t [STRIP_W-1:0] d);
    in_valid = 1'b1;
    in_data  = d;
    forever begin
      bit acc;
      acc = in_ready1 && in_ready16;
      check(in_ready1 == in_ready16, "engines load in lock step");
      step();
      if (acc) break;
    end
    in_valid = 1'b0;
  endtask

  task automatic run(input bit pde, input mv_t pa);
    pixel_t [STRIP_W-1:0] d;
    int guard;
    start = 1'b1; reuse = 1'b0; pde_en = pde; nb_a = pa; nb_b = pa; nb_c = pa;
    step();
    start = 1'b0;
    for (int r = 0; r < 16; r++) begin
      for (int c = 0; c < 16; c++) d[c] = cb[r][c];
      send_beat(d);
    end
    for (int r = 0; r < 48; r++)
      for (int s = 0; s < 3; s++) begin
        for (int c = 0; c < 16; c++) d[c] = frame[r][s*16 + c];
        send_beat(d);
      end
    guard = 0;
    while (busy1 || busy16) begin
      step();
      guard++;
    end
  endtask

  initial begin : main
    int tx, ty, best;
    mv_t pa;
    int r1, r16;
    start = 0; reuse = 0; pde_en = 0; in_valid = 0; in_data = '0;
    nb_a = '0; nb_b = '0; nb_c = '0;
    repeat (3) step();
    rst_n = 1'b1;
    for (int mb = 0; mb < 3; mb++) begin
      for (int r = 0; r < 51; r++)
        for (int c = 0; c < 51; c++) noise[r][c] = $urandom_range(255);
      for (int r = 0; r < 48; r++)
        for (int c = 0; c < 48; c++) begin
          int acc;
          acc = 0;
          for (int a = 0; a < 4; a++)
            for (int b = 0; b < 4; b++) acc += noise[r+a][c+b];
          frame[r][c] = byte'(acc / 16);
        end
      tx = $urandom_range(31) - 16;
      ty = $urandom_range(31) - 16;
      for (int l = 0; l < 16; l++)
        for (int k = 0; k < 16; k++) begin
          int v;
          v = int'(frame[16 + ty + l][16 + tx + k]) + $urandom_range(6) - 3;
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
              b = int'(frame[16 + j + l][16 + i + k]);
              s += (a > b) ? a - b : b - a;
            end
          sad_ref[j+16][i+16] = s;
          if (s < best) best = s;
        end
      pa.x = mvc_t'((mb == 1) ? 0 : tx);
      pa.y = mvc_t'((mb == 1) ? 0 : ty);

      run(1'b0, pa);
      check(rows1 == 16'd16384 && grp1 == 16'd1024, $sformatf("P=1 rows %0d groups %0d", rows1, grp1));
      check(rows16 == 16'd1024 && grp16 == 16'd64, $sformatf("P=16 rows %0d groups %0d", rows16, grp16));
      check(int'(sad1) == best && int'(sad16) == best, $sformatf("min SAD %0d / %0d exp %0d", sad1, sad16, best));
      check(sad_ref[int'(mv1.y)+16][int'(mv1.x)+16] == best, "P=1 vector has the minimum SAD");
      check(sad_ref[int'(mv16.y)+16][int'(mv16.x)+16] == best, "P=16 vector has the minimum SAD");

      run(1'b1, pa);
      r1 = int'(rows1); r16 = int'(rows16);
      check(int'(sad1) == best && int'(sad16) == best, $sformatf("PDE min SAD %0d / %0d exp %0d", sad1, sad16, best));
      check(r1 < 16384 && r16 < 1024 && skp1 > 0 && skp16 > 0, "elimination saves rows");
      $display("mb%0d: P=1 rows %0d (%0d%% skipped)  P=16 rows %0d (%0d%% skipped)",
               mb, r1, 100 - r1 * 100 / 16384, r16, 100 - r16 * 100 / 1024);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
