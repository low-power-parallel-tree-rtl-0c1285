// ram_mask: picks the N+P-1 search-window pixels one column group needs
// out of a full 48-pixel window row.
//
// The search-window buffer returns a row as three 16-pixel strips in
// physical order. Because of the strip-wise reuse between neighbouring
// macroblocks, logical strip s (0 = leftmost) sits in physical strip
// (strip_base + s) mod 3. The mask first rotates the row into logical
// order and then selects NP = N+P-1 consecutive pixels starting at logical
// column col. It also tells the buffer which physical 4-pixel banks hold
// those columns (bank_re), so that the other banks are not read: the
// "mask" on RAM accesses. Purely combinational. The block name and its place between
// the window buffer and the parallel tree follow the design description;
// the rotate-then-select form is this design's choice.
module ram_mask
  import me_pkg::*;
#(
  parameter int unsigned NP = BLK_N + 3    // pixels sent to the tree
) (
  input  pixel_t [SW_DIM-1:0] row,        // physical order
  input  logic   [1:0]        strip_base,
  input  logic   [5:0]        col,        // logical first column
  output pixel_t [NP-1:0]     out,
  output logic   [N_BANK-1:0] bank_re     // physical banks to read
);
  pixel_t [SW_DIM-1:0] lrow;

  always_comb begin
    for (int s = 0; s < int'(N_STRIP); s++) begin
      int ps;
      ps = (int'(strip_base) + s) % int'(N_STRIP);
      for (int c = 0; c < int'(STRIP_W); c++)
        lrow[s*STRIP_W + c] = row[ps*STRIP_W + c];
    end
    bank_re = '0;
    for (int lb = 0; lb < int'(N_BANK); lb++) begin
      int ls;
      logic [$clog2(N_BANK)-1:0] pb;
      ls = lb / int'(STRIP_W / BANK_W);
      pb = $clog2(N_BANK)'(((int'(strip_base) + ls) % int'(N_STRIP)) * int'(STRIP_W / BANK_W)
                           + lb % int'(STRIP_W / BANK_W));
      if ((lb + 1) * int'(BANK_W) > int'(col) && lb * int'(BANK_W) < int'(col) + int'(NP))
        bank_re[pb] = 1'b1;
    end
    for (int k = 0; k < int'(NP); k++) begin
      if (int'(col) + k < int'(SW_DIM)) out[k] = lrow[int'(col) + k];
      else                              out[k] = '0;
    end
  end
endmodule
