// sw_ram: search-window RAM buffer, 48 rows of three 16-pixel strips.
//
// Holds the 48x48-pixel window a 16x16 block needs for a -16..+15 search.
// It is written one strip row (16 pixels) per cycle at a physical strip
// index and read one whole window row (48 pixels, physical strip order)
// per cycle, but only the 4-pixel banks selected by bank_re are read; the
// others stay idle and drive zeros. Organising the window in 16-column strips lets horizontally
// adjacent macroblocks keep two of the three strips and load only one new
// strip (level-C style reuse); the controller and the RAM mask track which
// physical strip is logically leftmost. The RAM mask chooses the banks
// that hold the columns of the current candidate group (5 of 12 at P = 4),
// so a row read moves 20 pixels rather than 48. Read is asynchronous; with
// re low the whole port drives zeros (disabled RAM). Size follows the on-chip RAM
// figure of the design description (with the current block, 20480 bits);
// the strip and bank organisation and the port shapes are this design's
// choices.
module sw_ram
  import me_pkg::*;
(
  input  logic                  clk,
  input  logic                  we,
  input  logic [5:0]            wrow,
  input  logic [1:0]            wstrip,
  input  pixel_t [STRIP_W-1:0]  wdata,
  input  logic                  re,
  input  logic [N_BANK-1:0]     bank_re,
  input  logic [5:0]            rrow,
  output pixel_t [SW_DIM-1:0]   rdata
);
  pixel_t [STRIP_W-1:0] mem [SW_DIM][N_STRIP];

  always_ff @(posedge clk) begin
    if (we && wrow < 6'(SW_DIM) && wstrip < 2'(N_STRIP))
      mem[wrow][wstrip] <= wdata;
  end

  always_comb begin
    rdata = '0;
    if (re && rrow < 6'(SW_DIM))
      for (int s = 0; s < int'(N_STRIP); s++)
        for (int b = 0; b < int'(STRIP_W / BANK_W); b++)
          if (bank_re[s*(STRIP_W/BANK_W) + b])
            rdata[s*STRIP_W + b*BANK_W +: BANK_W] = mem[rrow][s][b*BANK_W +: BANK_W];
  end
endmodule
