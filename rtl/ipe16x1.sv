// ipe16x1: one "16x1 IPE", a 1/16 cut of a 16x16 SAD adder tree.
//
// Each cycle it takes one row of the current block (cur) and the matching
// row of one candidate block (sw), forms N absolute differences (abs_diff),
// sums them in a balanced binary adder tree (log2 N levels, widths growing
// by one bit per level) and adds the row sum to the accumulator ACC. With
// reload high the row sum replaces the accumulator instead, which starts a
// new candidate block. After N rows ACC holds the candidate's SAD.
//
// acc_next is the value ACC takes at the coming clock edge; the decision
// unit looks at it in the same cycle, so partial-distortion elimination can
// end a candidate without a pipeline bubble. en is the clock enable that
// stands for the clock gating of skipped cycles: with en low the
// accumulator holds its value. Structure (ADs, adder tree, ACC with reload)
// follows the design description; the enable and the zero-latency
// acc_next output are this design's choices.
module ipe16x1
  import me_pkg::*;
#(
  parameter int unsigned N = BLK_N      // ADs per IPE (power of two)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            reload,
  input  pixel_t [N-1:0]  cur,
  input  pixel_t [N-1:0]  sw,
  output sad_t            acc_next,
  output sad_t            acc_q
);
  localparam int unsigned LEVELS = $clog2(N);

  pixel_t [N-1:0] ad;
  for (genvar k = 0; k < N; k++) begin : g_ad
    abs_diff #(.W(PIX_W)) u_ad (.a(cur[k]), .b(sw[k]), .d(ad[k]));
  end

  // Adder tree: node[lvl][i] holds partial sums; level 0 are the ADs.
  sad_t tree [LEVELS+1][N];
  sad_t row_sum;

  always_comb begin
    for (int l = 0; l <= LEVELS; l++)
      for (int i = 0; i < N; i++)
        tree[l][i] = '0;
    for (int i = 0; i < N; i++)
      tree[0][i] = sad_t'(ad[i]);
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < (N >> l); i++)
        tree[l][i] = tree[l-1][2*i] + tree[l-1][2*i+1];
    row_sum = tree[LEVELS][0];
  end

  assign acc_next = reload ? row_sum : acc_q + row_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc_q <= '0;
    else if (en) acc_q <= acc_next;
  end
endmodule
