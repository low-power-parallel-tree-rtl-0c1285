// addr_gen_ctrl: address generator and control of the motion estimation
// engine.
//
// One macroblock is handled in three phases.
//   LOAD   The system streams 16-pixel beats (in_valid/in_ready): first the
//          N rows of the current block, then the search window. With
//          reuse low the whole 48x48 window follows, row by row, three strip
//          beats per row (144 beats). With reuse high the window moves 16
//          columns to the right: the oldest physical strip becomes the new
//          rightmost logical strip and only it is sent, one beat per row
//          (48 beats). strip_base names the physical strip that is
//          logically leftmost; the RAM mask uses it on reads.
//   SEARCH The column group offered by the spiral scanner is searched one
//          row per cycle: current-block row r and window row gy+r, window
//          columns gx*P .. gx*P+N+P-2. Row 0 reloads the accumulators. The
//          group ends after row N-1, or earlier when the decision unit
//          raises skip; in the same edge the scanner's next group is taken,
//          so there is no bubble between groups. If the scanner has no
//          group ready, the cycle is a stall and nothing is enabled.
//   DONE   One cycle with done high; best_mv/min_sad of the decision unit
//          are then final.
// The tree, the RAM read ports and the decision unit are enabled
// (tree_en/ram_re/dec_en) only in cycles that process a row; all other
// cycles, in particular those saved by skipping, leave them idle, which
// is where clock gating would cut their power.
// Counters report the rows processed (cycles the tree was busy), groups
// started, groups ended by skip and stall cycles of the last search.
// Phases, strip bookkeeping, beat formats and counters are this design's
// own; the block's role (driving both RAM buffers, reacting to skip) follows
// the design description.
module addr_gen_ctrl
  import me_pkg::*;
#(
  parameter int unsigned N  = BLK_N,
  parameter int unsigned SP = SRCH_P,
  parameter int unsigned P  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // command
  input  logic                  start,
  input  logic                  reuse,
  input  logic                  pde_en_in,
  input  mv_t                   pred_mv,
  output logic                  busy,
  output logic                  done,
  // pixel input stream
  input  logic                  in_valid,
  output logic                  in_ready,
  input  pixel_t [STRIP_W-1:0]  in_data,
  // current block RAM
  output logic                  cb_we,
  output logic [$clog2(N)-1:0]  cb_waddr,
  output logic [$clog2(N)-1:0]  cb_raddr,
  // search window RAM and mask
  output logic                  sw_we,
  output logic [5:0]            sw_wrow,
  output logic [1:0]            sw_wstrip,
  output logic [5:0]            sw_rrow,
  output logic [1:0]            strip_base,
  output logic [5:0]            mask_col,
  output pixel_t [STRIP_W-1:0]  wdata,
  output logic                  ram_re,
  // parallel tree and decision unit
  output logic                  tree_en,
  output logic                  reload,
  output logic                  dec_en,
  output logic                  dec_init,
  output logic                  pde_en,
  output logic                  last_row,
  output mvc_t                  grp_x,
  output mvc_t                  grp_y,
  input  logic                  skip,
  // spiral scanner
  output logic                  sp_start,
  output logic [5:0]            sp_cx,
  output logic [5:0]            sp_cy,
  output logic                  sp_take,
  input  logic                  sp_valid,
  input  logic [5:0]            sp_gx,
  input  logic [5:0]            sp_gy,
  input  logic                  sp_last,
  // statistics of the last search
  output logic [15:0]           rows_cnt,
  output logic [15:0]           grp_cnt,
  output logic [15:0]           skip_cnt,
  output logic [15:0]           stall_cnt
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_SEARCH, S_DONE} state_t;

  localparam int unsigned RW      = $clog2(N);
  localparam int unsigned FULL_B  = N + SW_DIM * N_STRIP;
  localparam int unsigned REUSE_B = N + SW_DIM;

  state_t     state;
  logic       reuse_q;
  logic [7:0] beat;
  logic [5:0] srow;
  logic [1:0] sstrip;
  logic [RW-1:0] row;

  // ---- load addressing ---------------------------------------------------
  logic       load_fire, load_last;

  function automatic logic [1:0] add3(logic [1:0] a, logic [1:0] b);
    logic [2:0] s;
    s = 3'(a) + 3'(b);
    return (s >= 3'd3) ? 2'(s - 3'd3) : 2'(s);
  endfunction

  assign in_ready  = (state == S_LOAD);
  assign load_fire = in_ready && in_valid;
  assign load_last = reuse_q ? (beat == 8'(REUSE_B - 1)) : (beat == 8'(FULL_B - 1));
  assign wdata     = in_data;

  always_comb begin
    cb_we     = load_fire && (beat < 8'(N));
    cb_waddr  = RW'(beat);
    sw_we     = load_fire && (beat >= 8'(N));
    sw_wrow   = srow;
    sw_wstrip = add3(strip_base, reuse_q ? 2'd2 : sstrip);
  end

  // ---- search addressing -------------------------------------------------
  logic active, grp_end;
  assign active   = (state == S_SEARCH) && sp_valid;
  assign last_row = (row == RW'(N - 1));
  assign grp_end  = active && (skip || last_row);

  assign cb_raddr = row;
  assign sw_rrow  = sp_gy + 6'(row);
  assign mask_col = 6'(sp_gx * P);
  assign grp_x    = mvc_t'(int'(sp_gx) * int'(P) - int'(SP));
  assign grp_y    = mvc_t'(int'(sp_gy) - int'(SP));
  assign ram_re   = active;
  assign tree_en  = active;
  assign dec_en   = active;
  assign reload   = (row == '0);
  assign sp_take  = grp_end;

  // predicted position -> start group (column group holding px, row py)
  assign sp_start = (state == S_IDLE) && start;
  assign sp_cx    = 6'((int'(pred_mv.x) + int'(SP)) / int'(P));
  assign sp_cy    = 6'(int'(pred_mv.y) + int'(SP));
  assign dec_init = sp_start;

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; reuse_q <= 1'b0; pde_en <= 1'b1; strip_base <= '0;
      beat <= '0; srow <= '0; sstrip <= '0; row <= '0;
      rows_cnt <= '0; grp_cnt <= '0; skip_cnt <= '0; stall_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_LOAD;
          reuse_q <= reuse;
          pde_en  <= pde_en_in;
          strip_base <= reuse ? add3(strip_base, 2'd1) : 2'd0;
          beat <= '0; srow <= '0; sstrip <= '0; row <= '0;
          rows_cnt <= '0; grp_cnt <= '0; skip_cnt <= '0; stall_cnt <= '0;
        end
        S_LOAD: if (load_fire) begin
          beat <= beat + 1'b1;
          if (beat >= 8'(N)) begin
            if (reuse_q || sstrip == 2'(N_STRIP - 1)) begin
              sstrip <= '0;
              srow   <= srow + 1'b1;
            end else begin
              sstrip <= sstrip + 1'b1;
            end
          end
          if (load_last) state <= S_SEARCH;
        end
        S_SEARCH: begin
          if (!sp_valid) stall_cnt <= stall_cnt + 1'b1;
          if (active) begin
            rows_cnt <= rows_cnt + 1'b1;
            if (row == '0) grp_cnt <= grp_cnt + 1'b1;
            if (grp_end) begin
              row <= '0;
              if (skip) skip_cnt <= skip_cnt + 1'b1;
              if (sp_last) state <= S_DONE;
            end else begin
              row <= row + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A group is only taken while the scanner offers one.
  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) sp_take |-> sp_valid);
  // Window rows addressed during a search stay inside the buffer.
  a_row_range:  assert property (@(posedge clk) disable iff (!rst_n) active |-> sw_rrow < 6'(SW_DIM));
endmodule
