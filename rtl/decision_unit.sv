// decision_unit: minimum comparing tree, recent-minimum register R and the
// comparator that raises skip.
//
// Each active cycle the P accumulated SADs of the parallel tree (the values
// the accumulators are about to take) enter a binary tree of min cells; on
// a tie the lower-numbered IPE wins. The smallest value is compared with R,
// the smallest complete SAD found so far:
//   * before the last row of a candidate group, if the smallest partial SAD
//     is already larger than R, skip is raised: none of the P candidates
//     can beat R, so the controller abandons the group (partial distortion
//     elimination). With pde_en low skip is never raised.
//   * on the last row, if the smallest SAD is below R, R and the best
//     motion vector take the new value at the clock edge (update).
// init loads R with the largest SAD value at the start of a search, so the
// first group (the predicted positions) always completes and supplies the
// initial SAD. skip and update are combinational; R changes only with en.
// The motion vector of IPE q is (grp_x + q, grp_y), grp_x being the
// horizontal displacement of IPE 0.
// The min tree, R and comparator follow the design description; tie rules,
// init and the strict "larger than" test for skip are this design's choices.
module decision_unit
  import me_pkg::*;
#(
  parameter int unsigned P = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          init,
  input  logic          pde_en,
  input  logic          last_row,
  input  sad_t [P-1:0]  sad,
  input  mvc_t          grp_x,
  input  mvc_t          grp_y,
  output logic          skip,
  output logic          update,
  output sad_t          min_sad,     // R
  output mv_t           best_mv
);
  localparam int unsigned LEVELS = $clog2(P);
  localparam int unsigned IDX_W  = (P > 1) ? $clog2(P) : 1;

  sad_t                 mval [LEVELS+1][P];
  logic [IDX_W-1:0]     midx [LEVELS+1][P];
  sad_t                 grp_min;
  logic [IDX_W-1:0]     grp_idx;

  always_comb begin
    for (int l = 0; l <= LEVELS; l++)
      for (int i = 0; i < P; i++) begin
        mval[l][i] = '1;
        midx[l][i] = '0;
      end
    for (int i = 0; i < P; i++) begin
      mval[0][i] = sad[i];
      midx[0][i] = IDX_W'(i);
    end
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < (P >> l); i++) begin
        if (mval[l-1][2*i+1] < mval[l-1][2*i]) begin
          mval[l][i] = mval[l-1][2*i+1];
          midx[l][i] = midx[l-1][2*i+1];
        end else begin
          mval[l][i] = mval[l-1][2*i];
          midx[l][i] = midx[l-1][2*i];
        end
      end
    grp_min = mval[LEVELS][0];
    grp_idx = midx[LEVELS][0];
  end

  assign skip   = en && pde_en && !last_row && (grp_min > min_sad);
  assign update = en && last_row && (grp_min < min_sad);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_sad <= '1;
      best_mv <= '0;
    end else if (init) begin
      min_sad <= '1;
      best_mv <= '0;
    end else if (update) begin
      min_sad   <= grp_min;
      best_mv.x <= grp_x + mvc_t'(grp_idx);
      best_mv.y <= grp_y;
    end
  end
endmodule
