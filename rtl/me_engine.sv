// me_engine: low-power parallel-tree full-search block-matching motion
// estimation engine (16x16 blocks, search range -16..+15, 8-bit pixels).
//
// Structure, from the system side down:
//   mv_predictor   median of three neighbour motion vectors -> predicted
//                  position of the block
//   addr_gen_ctrl  takes the pixel stream into the two RAM buffers, then
//                  walks the candidate groups in spiral order and addresses
//                  one row per cycle; reacts to skip
//   spiral_scan    order of the candidate groups
//   cur_block_ram  16x16 current block, one row per cycle
//   sw_ram         48x48 search window in three 16-column strips
//   ram_mask       cuts the N+P-1 window pixels of the group out of a row
//                  and enables only the window RAM banks holding them
//   parallel_tree  P 16x1 IPEs, one candidate each, sharing window pixels
//   decision_unit  min tree, recent minimum R, skip and best motion vector
//
// Operation: pulse start (with reuse, pde_en and the three neighbour
// vectors), stream the current block and the window (see addr_gen_ctrl),
// then wait for done. best_mv is the displacement (x right, y down) of the
// best 16x16 candidate in the window and min_sad its SAD. Without partial
// distortion elimination (pde_en low) a search takes exactly
// (2p)^2*N/P rows = 4096 cycles at P = 4; with it, groups whose smallest
// partial SAD already exceeds the best complete SAD are dropped early.
// Cycles saved this way leave the tree, the RAMs and the decision unit
// disabled.
// The block structure follows the design description (its block diagram of
// the engine); the load format, the stream interface and the statistics
// outputs are this design's own.
module me_engine
  import me_pkg::*;
#(
  parameter int unsigned P = 4      // parallelism: IPEs in the tree (1, 2, 4, 8, 16, 32)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  reuse,
  input  logic                  pde_en,
  input  mv_t                   nb_mv_a,
  input  mv_t                   nb_mv_b,
  input  mv_t                   nb_mv_c,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  pixel_t [STRIP_W-1:0]  in_data,
  output logic                  busy,
  output logic                  done,
  output logic                  skip,
  output mv_t                   best_mv,
  output sad_t                  min_sad,
  output logic [15:0]           rows_cnt,
  output logic [15:0]           grp_cnt,
  output logic [15:0]           skip_cnt,
  output logic [15:0]           stall_cnt
);
  localparam int unsigned N  = BLK_N;
  localparam int unsigned NP = N + P - 1;
  localparam int unsigned GX = 2 * SRCH_P / P;
  localparam int unsigned GY = 2 * SRCH_P;

  mv_t pred_mv;

  logic                  cb_we, sw_we, ram_re, tree_en, reload, dec_en, dec_init;
  logic                  pde_q, last_row;
  logic [$clog2(N)-1:0]  cb_waddr, cb_raddr;
  logic [5:0]            sw_wrow, sw_rrow, mask_col;
  logic [1:0]            sw_wstrip, strip_base;
  pixel_t [STRIP_W-1:0]  wdata;
  mvc_t                  grp_x, grp_y;
  logic                  sp_start, sp_take, sp_valid, sp_last;
  logic [5:0]            sp_cx, sp_cy, sp_gx, sp_gy;

  pixel_t [N-1:0]        cb_row;
  pixel_t [SW_DIM-1:0]   sw_row;
  pixel_t [NP-1:0]       sw_pix;
  logic   [N_BANK-1:0]   bank_re;
  sad_t   [P-1:0]        sad_next;

  mv_predictor u_pred (.mv_a(nb_mv_a), .mv_b(nb_mv_b), .mv_c(nb_mv_c), .mv_pred(pred_mv));

  addr_gen_ctrl #(.N(N), .SP(SRCH_P), .P(P)) u_ctrl (
    .clk, .rst_n, .start, .reuse, .pde_en_in(pde_en), .pred_mv, .busy, .done,
    .in_valid, .in_ready, .in_data,
    .cb_we, .cb_waddr, .cb_raddr,
    .sw_we, .sw_wrow, .sw_wstrip, .sw_rrow, .strip_base, .mask_col, .wdata, .ram_re,
    .tree_en, .reload, .dec_en, .dec_init, .pde_en(pde_q), .last_row, .grp_x, .grp_y, .skip,
    .sp_start, .sp_cx, .sp_cy, .sp_take, .sp_valid, .sp_gx, .sp_gy, .sp_last,
    .rows_cnt, .grp_cnt, .skip_cnt, .stall_cnt
  );

  spiral_scan #(.GX(GX), .GY(GY)) u_scan (
    .clk, .rst_n, .start(sp_start), .cx(sp_cx), .cy(sp_cy), .take(sp_take),
    .valid(sp_valid), .gx(sp_gx), .gy(sp_gy), .last(sp_last)
  );

  cur_block_ram #(.N(N)) u_cb (
    .clk, .we(cb_we), .waddr(cb_waddr), .wdata(wdata[N-1:0]),
    .re(ram_re), .raddr(cb_raddr), .rdata(cb_row)
  );

  sw_ram u_sw (
    .clk, .we(sw_we), .wrow(sw_wrow), .wstrip(sw_wstrip), .wdata(wdata),
    .re(ram_re), .bank_re, .rrow(sw_rrow), .rdata(sw_row)
  );

  ram_mask #(.NP(NP)) u_mask (
    .row(sw_row), .strip_base, .col(mask_col), .out(sw_pix), .bank_re
  );

  parallel_tree #(.N(N), .P(P)) u_tree (
    .clk, .rst_n, .en(tree_en), .reload, .cur(cb_row), .sw(sw_pix),
    .sad_next, .sad_q()
  );

  decision_unit #(.P(P)) u_dec (
    .clk, .rst_n, .en(dec_en), .init(dec_init), .pde_en(pde_q), .last_row,
    .sad(sad_next), .grp_x, .grp_y, .skip, .update(), .min_sad, .best_mv
  );
endmodule
