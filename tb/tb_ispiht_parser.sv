// Self-checking test of ispiht_parser: blocks are coded by the reference
// coder; the parser is stepped through planes 8..0 with the testbench
// carrying the state from plane to plane (and skipping the sign bits).  The
// accumulated magnitudes must equal the reference decoder's, and for a
// stream that fits its target the final address must equal its length.
module tb_ispiht_parser;
  import fmc_pkg::*;
  import fmc_ref_pkg::*;
  logic [TBL_MAX-1:0] bs;
  logic [POS_W-1:0] tbl;
  logic [10:0] pos, sign_pos, next_pos;
  logic [6:0] band_sig, band_sig_nx;
  logic [3:0] grp_sig [7], grp_sig_nx [7];
  logic [NCOEF-1:0] coef_sig, mbit, new_sig;
  int checks = 0, failures = 0;

  ispiht_parser dut (.*);

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pix[64], c[64], d[64], len, mag[64];
    bit rbs[384];
    for (int t = 0; t < 120; t++) begin
      for (int i = 0; i < 64; i++)
        pix[i] = (t % 3 == 0) ? $urandom_range(0, 255) : (t % 3 == 1) ? 70 + (i % 8) * 7 + $urandom_range(0, 5) : 50 + 100 * ((i / 8) > 3);
      dwt(pix, c);
      tbl = tbl_bits(2'(t % 3));
      encode(c, int'(tbl), rbs, len);
      decode(rbs, int'(tbl), d);
      for (int i = 0; i < 384; i++) bs[i] = rbs[i];
      band_sig = 7'b1; for (int b = 0; b < 7; b++) grp_sig[b] = 0;
      coef_sig = 0; pos = 0;
      for (int i = 0; i < 64; i++) mag[i] = 0;
      for (int n = 8; n >= 0; n--) begin
        #1;
        checks++;
        if (next_pos != sign_pos + 11'($countones(new_sig)) || (new_sig & coef_sig) != 0 || (new_sig & ~mbit) != 0) failures++;
        for (int i = 0; i < 64; i++) if (mbit[i]) mag[i] |= 1 << n;
        band_sig = band_sig_nx; grp_sig = grp_sig_nx; coef_sig = coef_sig | new_sig; pos = next_pos;
      end
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (mag[i] != ((d[i] < 0) ? -d[i] : d[i])) failures++;
      end
      if (len <= int'(tbl)) begin
        checks++;
        if (int'(pos) != len) begin failures++; $display("end address %0d, length %0d", pos, len); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
