// tb_sw_ram: fills the 48x48 search-window buffer strip by strip with
// random data, reads all 48 rows back (asynchronous read, physical strip
// order, all banks enabled), reads again with random bank enables and
// checks that exactly the disabled banks read as zero, checks zeros while
// the port is disabled, overwrites random strips as a
// window shift would, and reads everything again.
module tb_sw_ram;
  import me_pkg::*;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [5:0] wrow = '0, rrow = '0;
  logic [1:0] wstrip = '0;
  logic [11:0] bank_re = '1;
  pixel_t [15:0] wdata;
  pixel_t [47:0] rdata;
  pixel_t [15:0] model [48][3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sw_ram dut (.clk, .we, .wrow, .wstrip, .wdata, .re, .bank_re, .rrow, .rdata);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(); @(posedge clk); #1; endtask

  task automatic write_strip(input int r, input int s);
    for (int k = 0; k < 16; k++) wdata[k] = pixel_t'($urandom_range(255));
    model[r][s] = wdata;
    we = 1'b1; wrow = 6'(r); wstrip = 2'(s);
    step();
    we = 1'b0;
  endtask

  task automatic read_all();
    for (int r = 0; r < 48; r++) begin
      re = 1'b1; rrow = 6'(r);
      #1;
      for (int s = 0; s < 3; s++) begin
        checks++;
        if (rdata[s*16 +: 16] != model[r][s]) begin
          failures++; $display("FAIL: row %0d strip %0d", r, s);
        end
      end
      bank_re = 12'($urandom_range(4095));
      #1;
      for (int b = 0; b < 12; b++) begin
        checks++;
        if (rdata[b*4 +: 4] != (bank_re[b] ? model[r][b/4][(b%4)*4 +: 4] : 16'h0)) begin
          failures++; $display("FAIL: row %0d bank %0d enable %0d", r, b, bank_re[b]);
        end
      end
      bank_re = '1;
      re = 1'b0;
      #1;
      checks++;
      if (rdata != '0) begin failures++; $display("FAIL: row %0d read while disabled", r); end
    end
  endtask

  initial begin
    wdata = '0;
    step();
    for (int r = 0; r < 48; r++)
      for (int s = 0; s < 3; s++) write_strip(r, s);
    read_all();
    for (int s = 0; s < 3; s++)
      for (int r = 0; r < 48; r++) write_strip(r, (s + 1) % 3);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
