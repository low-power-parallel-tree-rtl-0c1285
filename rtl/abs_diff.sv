// abs_diff: the AD element of a 16x1 IPE.
//
// Combinational |a - b| of two unsigned pixels: a current-block pixel and a
// search-window pixel. The difference is formed one bit wider and the
// smaller operand subtracted from the larger, so the result is the exact
// absolute difference in PIX_W bits. No clock, no latency; the IPE adds
// sixteen of these per cycle. The AD function follows the design
// description; the compare-and-subtract form is this design's choice.
module abs_diff
  import me_pkg::*;
#(
  parameter int unsigned W = PIX_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] d
);
  always_comb begin
    if (a >= b) d = a - b;
    else        d = b - a;
  end
endmodule
