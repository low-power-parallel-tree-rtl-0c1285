// cur_block_ram: current-block RAM buffer, N rows of N 8-bit pixels.
//
// The macroblock being searched is written once from the system side, one
// row of N pixels per cycle (we, waddr, wdata, at the clock edge), and is
// then read one row per cycle by the parallel tree. The read is
// asynchronous (raddr to rdata in the same cycle) so that the adder tree and
// the decision unit see a row in the cycle it is addressed. With re low the
// read port drives zeros, standing for the disabled RAM of skipped cycles.
// Function and size follow the design description; row-wide ports, the
// asynchronous read and the zeroed idle output are this design's choices.
module cur_block_ram
  import me_pkg::*;
#(
  parameter int unsigned N = BLK_N
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [$clog2(N)-1:0]  waddr,
  input  pixel_t [N-1:0]        wdata,
  input  logic                  re,
  input  logic [$clog2(N)-1:0]  raddr,
  output pixel_t [N-1:0]        rdata
);
  pixel_t [N-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = re ? mem[raddr] : '0;
endmodule
