// tb_cur_block_ram: writes a random 16x16 block row by row, reads every row
// back (asynchronous read), checks that the read port drives zeros while
// disabled, then rewrites random rows and checks again.
module tb_cur_block_ram;
  import me_pkg::*;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [3:0] waddr = '0, raddr = '0;
  pixel_t [15:0] wdata, rdata;
  pixel_t [15:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cur_block_ram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(); @(posedge clk); #1; endtask

  task automatic write_row(input int r);
    for (int k = 0; k < 16; k++) wdata[k] = pixel_t'($urandom_range(255));
    model[r] = wdata;
    we = 1'b1; waddr = 4'(r);
    step();
    we = 1'b0;
  endtask

  task automatic read_all();
    for (int r = 0; r < 16; r++) begin
      re = 1'b1; raddr = 4'(r);
      #1;
      checks++;
      if (rdata != model[r]) begin failures++; $display("FAIL: row %0d", r); end
      re = 1'b0;
      #1;
      checks++;
      if (rdata != '0) begin failures++; $display("FAIL: row %0d read while disabled", r); end
    end
  endtask

  initial begin
    wdata = '0;
    step();
    for (int r = 0; r < 16; r++) write_row(r);
    read_all();
    for (int n = 0; n < 50; n++) write_row($urandom_range(15));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
