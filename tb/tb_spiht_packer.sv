// Self-checking test of spiht_packer: random segments (bits and counts) for
// up to nine planes per block are packed; the expected bitstream is the
// plain concatenation of the valid bits of every segment in order, cut at the
// target length.  Checks bs and bs_len two cycles after each plane.
module tb_spiht_packer;
  import fmc_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [POS_W-1:0] tbl = 384;
  logic [SEG_W-1:0] seg_bits [20];
  logic [4:0] seg_cnt [20];
  logic [TBL_MAX-1:0] bs;
  logic [POS_W-1:0] bs_len;
  logic app_valid;
  int checks = 0, failures = 0;

  spiht_packer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit q[$];
    for (int s = 0; s < 20; s++) begin seg_bits[s] = 0; seg_cnt[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      q.delete();
      tbl = tbl_bits(2'(blk % 3));
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int n = 0; n < 9; n++) begin
        for (int s = 0; s < 20; s++) begin
          int mx;
          mx = (s >= 1 && s <= 11 && s % 2 == 1) ? ((s >= 7) ? 5 : 1) : ((s == 0 || s == 2 || s == 4 || s == 6 || (s >= 13 && s <= 16)) ? 4 : 16);
          seg_cnt[s] = 5'($urandom_range(0, (blk % 4 == 0) ? mx : mx / 2));
          seg_bits[s] = 16'($urandom);    // bits above the count must be ignored
          for (int k = 0; k < seg_cnt[s]; k++) q.push_back(seg_bits[s][k]);
        end
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        @(negedge clk);
        checks++;
        if (int'(bs_len) != ((q.size() < int'(tbl)) ? q.size() : int'(tbl))) begin failures++; $display("len %0d want %0d", bs_len, q.size()); end
        for (int i = 0; i < 384; i++) begin
          checks++;
          if (bs[i] != ((i < q.size() && i < int'(tbl)) ? q[i] : 1'b0)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
