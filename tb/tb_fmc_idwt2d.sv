// Self-checking test of fmc_idwt2d: (a) coefficients of random and smooth
// pixel blocks from the reference forward DWT must give the pixels back
// exactly (the 5/3 lifting is reversible); (b) arbitrary coefficients must
// match the reference inverse DWT clamped to 0..255.  Rows must come out in
// the 8 cycles after load, back to back for consecutive loads.
module tb_fmc_idwt2d;
  import fmc_pkg::*;
  import fmc_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  coef_t coef [NCOEF];
  logic out_valid;
  logic [63:0] out_row;
  int checks = 0, failures = 0;

  fmc_idwt2d dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int pix[64], c[64], p[64], want[64];
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      if (t % 2 == 0) begin
        for (int i = 0; i < 64; i++) pix[i] = (t % 4 == 0) ? $urandom_range(0, 255) : 90 + (i % 8) * 6 + $urandom_range(0, 2);
        dwt(pix, c);
        want = pix;
      end else begin
        for (int i = 0; i < 64; i++) c[i] = (i < 4) ? $urandom_range(0, 400) : int'($urandom_range(0, 80)) - 40;
        idwt(c, p);
        for (int i = 0; i < 64; i++) want[i] = clamp8(p[i]);
      end
      for (int i = 0; i < 64; i++) coef[i] = coef_t'(c[i]);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (!out_valid) failures++;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(out_row[k*8 +: 8]) != want[r*8+k]) begin
            failures++;
            if (failures < 10) $display("block %0d row %0d px %0d: got %0d want %0d", t, r, k, out_row[k*8 +: 8], want[r*8+k]);
          end
        end
        if (r == 7 && t % 3 != 0) begin
          // next block loaded in the last row's cycle: output stays continuous
          break;
        end
        @(negedge clk);
      end
      if (t % 3 == 0) begin checks++; if (out_valid) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
