// spiral_scan: order in which the column groups of the search range are
// visited: the group holding the predicted position first, then a spiral
// outwards, clipped to the search range.
//
// Candidates are handled in groups of P horizontally adjacent positions, so
// the scan runs on a grid of GX = 2p/P group columns by GY = 2p rows. Ring
// k around the start group (cx,cy) is walked as: top row left to right
// (including both top corners), right column downwards, bottom row right to
// left, left column upwards. Each of the four legs is clipped to the grid
// when it is set up; a leg that lies wholly outside emits nothing and is
// passed over in one cycle, also while the output register is still
// occupied, so that the next position is usually ready when it is taken. Every grid position is emitted exactly once; the run ends
// after GX*GY positions.
//
// Interface: start (one cycle) loads cx/cy and restarts the scan. Positions
// appear in a one-entry output register (valid, gx, gy, last); the consumer
// pulses take to accept the current one, and the next is produced in the
// same edge when it is on a leg already set up, so a steady one position per
// cycle is possible. last marks the final position of the scan.
// Starting from the predicted group and scanning a spiral follows the
// design description; the ring and leg order and the clipping scheme are
// this design's reading of the spiral figure.
module spiral_scan #(
  parameter int unsigned GX = 8,     // group columns (2p / P)
  parameter int unsigned GY = 32     // rows (2p)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] cx,
  input  logic [5:0] cy,
  input  logic       take,
  output logic       valid,
  output logic [5:0] gx,
  output logic [5:0] gy,
  output logic       last
);
  localparam int unsigned TOTAL = GX * GY;
  localparam int unsigned CNT_W = $clog2(TOTAL + 1);

  typedef logic signed [7:0] crd_t;

  logic             busy, in_leg;
  logic [6:0]       k;
  logic [1:0]       leg;
  crd_t             x, y, ex, ey, dx, dy;
  crd_t             cxs, cys;
  logic [CNT_W-1:0] cnt;

  // Set-up of leg `leg` of ring `k`: start, end, direction, non-empty.
  crd_t sx, sy, tx, ty, sdx, sdy;
  logic s_ok;

  function automatic int imax(int a, int b); return (a > b) ? a : b; endfunction
  function automatic int imin(int a, int b); return (a < b) ? a : b; endfunction

  always_comb begin
    int ki, c_x, c_y, a, b;
    ki  = int'(k);
    c_x = int'(cxs);
    c_y = int'(cys);
    sx = '0; sy = '0; tx = '0; ty = '0; sdx = '0; sdy = '0; s_ok = 1'b0;
    unique case (leg)
      2'd0: begin                                  // top row, +x
        a = imax(c_x - ki, 0); b = imin(c_x + ki, int'(GX) - 1);
        s_ok = (c_y - ki >= 0) && (a <= b);
        sx = crd_t'(a); tx = crd_t'(b); sy = crd_t'(c_y - ki); ty = sy; sdx = 8'sd1;
      end
      2'd1: begin                                  // right column, +y
        a = imax(c_y - ki + 1, 0); b = imin(c_y + ki, int'(GY) - 1);
        s_ok = (c_x + ki <= int'(GX) - 1) && (a <= b);
        sy = crd_t'(a); ty = crd_t'(b); sx = crd_t'(c_x + ki); tx = sx; sdy = 8'sd1;
      end
      2'd2: begin                                  // bottom row, -x
        a = imin(c_x + ki - 1, int'(GX) - 1); b = imax(c_x - ki, 0);
        s_ok = (c_y + ki <= int'(GY) - 1) && (a >= b);
        sx = crd_t'(a); tx = crd_t'(b); sy = crd_t'(c_y + ki); ty = sy; sdx = -8'sd1;
      end
      default: begin                               // left column, -y
        a = imin(c_y + ki - 1, int'(GY) - 1); b = imax(c_y - ki + 1, 0);
        s_ok = (c_x - ki >= 0) && (a >= b);
        sy = crd_t'(a); ty = crd_t'(b); sx = crd_t'(c_x - ki); tx = sx; sdy = -8'sd1;
      end
    endcase
  end

  logic load;
  assign load = !valid || take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; in_leg <= 1'b0; k <= '0; leg <= '0; cnt <= '0;
      x <= '0; y <= '0; ex <= '0; ey <= '0; dx <= '0; dy <= '0;
      cxs <= '0; cys <= '0;
      valid <= 1'b0; gx <= '0; gy <= '0; last <= 1'b0;
    end else if (start) begin
      busy <= 1'b1; in_leg <= 1'b0; k <= '0; leg <= '0; cnt <= '0;
      cxs <= crd_t'({2'b00, cx}); cys <= crd_t'({2'b00, cy});
      valid <= 1'b0; last <= 1'b0;
    end else if (busy && !in_leg && !s_ok) begin
      // empty leg: skipped whether or not the output register is free
      if (take) valid <= 1'b0;
      leg <= leg + 1'b1;
      if (leg == 2'd3) k <= k + 1'b1;
    end else if (load) begin
      valid <= 1'b0;
      if (busy && in_leg) begin
        valid <= 1'b1;
        gx    <= 6'(x);
        gy    <= 6'(y);
        cnt   <= cnt + 1'b1;
        last  <= (cnt == CNT_W'(TOTAL - 1));
        if (cnt == CNT_W'(TOTAL - 1)) busy <= 1'b0;
        if (x == ex && y == ey) in_leg <= 1'b0;
        else begin
          x <= x + dx;
          y <= y + dy;
        end
      end else if (busy) begin
        leg <= leg + 1'b1;
        if (leg == 2'd3) k <= k + 1'b1;
        if (s_ok) begin
          valid <= 1'b1;
          gx    <= 6'(sx);
          gy    <= 6'(sy);
          cnt   <= cnt + 1'b1;
          last  <= (cnt == CNT_W'(TOTAL - 1));
          if (cnt == CNT_W'(TOTAL - 1)) busy <= 1'b0;
          if (!(sx == tx && sy == ty)) begin
            in_leg <= 1'b1;
            x  <= sx + sdx;
            y  <= sy + sdy;
            ex <= tx;
            ey <= ty;
            dx <= sdx;
            dy <= sdy;
          end
        end
      end
    end
  end
endmodule
