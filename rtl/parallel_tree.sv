// parallel_tree: P 16x1 IPEs searching P horizontally adjacent candidates.
//
// N current-block pixels and N+P-1 search-window pixels of one row are
// broadcast to all IPEs. IPE q takes search-window pixels q .. q+N-1, so
// the P candidates of a column group share the window data horizontally
// and the window port is only N+P-1 pixels wide (19 for P = 4, 31 for
// P = 16). All IPEs share one enable and one reload; their next
// accumulator values go to the decision unit in the same cycle.
// The organisation follows the design description; P defaults to 4, the
// parallelism the description works its example with.
module parallel_tree
  import me_pkg::*;
#(
  parameter int unsigned N = BLK_N,
  parameter int unsigned P = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                reload,
  input  pixel_t [N-1:0]      cur,
  input  pixel_t [N+P-2:0]    sw,
  output sad_t   [P-1:0]      sad_next,
  output sad_t   [P-1:0]      sad_q
);
  for (genvar q = 0; q < P; q++) begin : g_ipe
    ipe16x1 #(.N(N)) u_ipe (
      .clk, .rst_n, .en, .reload,
      .cur      (cur),
      .sw       (sw[q +: N]),
      .acc_next (sad_next[q]),
      .acc_q    (sad_q[q])
    );
  end
endmodule
