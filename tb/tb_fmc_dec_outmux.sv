// Self-checking test of fmc_dec_outmux: alternating done pulses from the two
// cores with random coefficient buffers; the held block must be the one of
// the core that finished, valid must rise after done and fall after take.
module tb_fmc_dec_outmux;
  import fmc_pkg::*;
  logic clk = 0, rst_n = 0, take = 0, valid;
  logic done [2];
  coef_t coef_in [2][NCOEF];
  coef_t coef [NCOEF];
  int checks = 0, failures = 0;

  fmc_dec_outmux dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    coef_t want [NCOEF];
    done[0] = 0; done[1] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int k;
      k = $urandom_range(0, 1);
      for (int j = 0; j < 2; j++)
        for (int i = 0; i < NCOEF; i++) coef_in[j][i] = coef_t'($urandom);
      want = coef_in[k];
      done[k] = 1;
      @(negedge clk);
      done[k] = 0;
      for (int i = 0; i < NCOEF; i++) begin coef_in[0][i] = '0; coef_in[1][i] = '0; end
      repeat ($urandom_range(0, 5)) @(negedge clk);
      checks++;
      if (!valid) failures++;
      for (int i = 0; i < NCOEF; i++) begin checks++; if (coef[i] != want[i]) failures++; end
      take = 1;
      @(negedge clk);
      take = 0;
      checks++;
      if (valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
