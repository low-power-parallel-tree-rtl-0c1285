// tb_ram_mask: checks the RAM mask for every strip base and every column
// offset a search uses, with random rows: output pixel k must be logical
// column col+k, where logical strip s lives in physical strip
// (base+s) mod 3. The bank enables must be exactly the physical 4-pixel
// banks that hold an output pixel; at column offsets that are multiples
// of 4 that is 5 banks. Uses the default 19-pixel output (P = 4).
module tb_ram_mask;
  import me_pkg::*;
  localparam int NP = 19;
  pixel_t [SW_DIM-1:0] row;
  logic [1:0] base;
  logic [5:0] col;
  pixel_t [NP-1:0] out;
  logic [11:0] bank_re, exp_bank;
  int checks = 0, failures = 0;

  ram_mask #(.NP(NP)) dut (.row, .strip_base(base), .col, .out, .bank_re);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < SW_DIM; i++) row[i] = pixel_t'($urandom_range(255));
      for (int bs = 0; bs < 3; bs++)
        for (int c = 0; c <= 28; c++) begin
          base = 2'(bs); col = 6'(c);
          #1;
          exp_bank = '0;
          for (int k = 0; k < NP; k++) begin
            int lc, ps;
            lc = c + k;
            ps = ((bs + lc / 16) % 3) * 16 + lc % 16;
            exp_bank[ps / 4] = 1'b1;
            checks++;
            if (out[k] != row[ps]) begin
              failures++;
              $display("FAIL: base %0d col %0d k %0d got %0d exp %0d", bs, c, k, out[k], row[ps]);
            end
          end
          checks++;
          if (bank_re != exp_bank || (c % 4 == 0 && $countones(bank_re) != 5)) begin
            failures++;
            $display("FAIL: base %0d col %0d banks %b exp %b", bs, c, bank_re, exp_bank);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
