// mv_predictor: predicted motion vector of a macroblock, the component-wise
// median of the motion vectors of three neighbouring blocks.
//
// Purely combinational. median(a,b,c) = max(min(a,b), min(max(a,b),c)) on
// signed components. The search engine starts from the column group that
// contains this position. The median rule follows the design description;
// which three neighbours are used is left to the system that supplies them.
module mv_predictor
  import me_pkg::*;
(
  input  mv_t mv_a,
  input  mv_t mv_b,
  input  mv_t mv_c,
  output mv_t mv_pred
);
  function automatic mvc_t med3(mvc_t a, mvc_t b, mvc_t c);
    mvc_t lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    if (c < lo)      return lo;
    else if (c > hi) return hi;
    else             return c;
  endfunction

  assign mv_pred.x = med3(mv_a.x, mv_b.x, mv_c.x);
  assign mv_pred.y = med3(mv_a.y, mv_b.y, mv_c.y);
endmodule
