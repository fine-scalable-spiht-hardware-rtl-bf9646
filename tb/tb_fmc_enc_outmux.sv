// Self-checking test of fmc_enc_outmux: each core in turn raises done with a
// random bitstream; the block must come out as nwords consecutive words
// starting the next cycle, bits in order, with out_last on the last word.
module tb_fmc_enc_outmux;
  import fmc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] done = 0;
  logic [TBL_MAX-1:0] bs [2];
  logic [2:0] nwords = 6;
  logic out_valid, out_last;
  logic [63:0] out_data;
  int checks = 0, failures = 0;

  fmc_enc_outmux dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [TBL_MAX-1:0] ref_bs;
    bs[0] = '0; bs[1] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int k;
      k = t % 2;
      nwords = tbl_words(2'($urandom_range(0, 2)));
      for (int w = 0; w < 6; w++) bs[k][w*64 +: 64] = {$urandom, $urandom};
      ref_bs = bs[k];
      done = 2'b01 << k;
      @(negedge clk);
      done = 0;
      bs[k] = '0;                         // the core may move on
      for (int w = 0; w < int'(nwords); w++) begin
        checks++;
        if (!out_valid || out_data != ref_bs[w*64 +: 64] || out_last != (w == int'(nwords) - 1)) begin
          failures++;
          if (failures < 10) $display("block %0d word %0d wrong", t, w);
        end
        @(negedge clk);
      end
      checks++;
      if (out_valid) failures++;
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
