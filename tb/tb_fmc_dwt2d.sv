// Self-checking test of fmc_dwt2d: streams random and smooth 8x8 blocks in,
// one row per cycle, and compares the 64 coefficients with the reference
// 5/3 transform; checks that coef_valid comes exactly one cycle after row 7.
module tb_fmc_dwt2d;
  import fmc_pkg::*;
  import fmc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic row_valid = 0;
  logic [2:0] row_idx = 0;
  logic [63:0] row_pix = 0;
  logic coef_valid;
  coef_t coef [NCOEF];
  int checks = 0, failures = 0;

  fmc_dwt2d dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pix[64], ref_c[64];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 64; i++)
        pix[i] = (t % 3 == 0) ? $urandom_range(0, 255)
               : (t % 3 == 1) ? (100 + (i % 8) * 3 + (i / 8) * 2 + $urandom_range(0, 4))
               : ((t & 4) ? 255 : 0);
      dwt(pix, ref_c);
      for (int r = 0; r < 8; r++) begin
        @(negedge clk);
        row_valid = 1; row_idx = 3'(r);
        for (int c = 0; c < 8; c++) row_pix[c*8 +: 8] = 8'(pix[r*8+c]);
        // optional gap between rows
        if (r == 3 && t % 2 == 1) begin
          @(negedge clk); row_valid = 0;
          @(negedge clk); row_valid = 1;
        end
      end
      @(negedge clk);
      row_valid = 0;
      checks++;
      if (coef_valid !== 1'b1) begin failures++; $display("coef_valid missing, block %0d", t); end
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (int'(coef[i]) != ref_c[i]) begin
          failures++;
          if (failures < 10) $display("block %0d coef %0d: got %0d want %0d", t, i, coef[i], ref_c[i]);
        end
      end
      @(negedge clk);
      checks++;
      if (coef_valid !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
