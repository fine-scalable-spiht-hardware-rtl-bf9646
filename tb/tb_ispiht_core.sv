// Self-checking test of ispiht_core: blocks are coded by the reference coder
// at the three target lengths (and untruncated where the stream fits), fed
// to the core, and the decoded coefficients are compared with the reference
// decoder; done must come 11 cycles after start.  For streams that fit
// completely the decoded coefficients must equal the saturated originals.
module tb_ispiht_core;
  import fmc_pkg::*;
  import fmc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [TBL_MAX-1:0] bs_in = '0;
  logic [POS_W-1:0] tbl_in = 384;
  logic done;
  coef_t coef [NCOEF];
  int checks = 0, failures = 0;

  ispiht_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pix[64], c[64], d[64], len, exact;
    bit rbs[384];
    exact = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 90; t++) begin
      case (t % 4)
        0: for (int i = 0; i < 64; i++) pix[i] = $urandom_range(0, 255);
        1: for (int i = 0; i < 64; i++) pix[i] = 80 + (i % 8) * 4 + (i / 8) * 3 + $urandom_range(0, 3);
        2: for (int i = 0; i < 64; i++) pix[i] = ((i % 8) < 4) ? 30 : 200;
        default: for (int i = 0; i < 64; i++) pix[i] = 100 + $urandom_range(0, 1);
      endcase
      dwt(pix, c);
      tbl_in = tbl_bits(2'(t % 3));
      encode(c, int'(tbl_in), rbs, len);
      decode(rbs, int'(tbl_in), d);
      for (int i = 0; i < 384; i++) bs_in[i] = rbs[i];
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      bs_in = '0;
      for (int k = 1; k < 11; k++) begin
        checks++;
        if (done) begin failures++; $display("done early at %0d", k); end
        @(negedge clk);
      end
      checks++;
      if (!done) begin failures++; $display("block %0d: no done at cycle 11", t); end
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (int'(coef[i]) != d[i]) begin
          failures++;
          if (failures < 10) $display("block %0d coef %0d: got %0d want %0d", t, i, coef[i], d[i]);
        end
      end
      if (len <= int'(tbl_in)) begin
        exact++;
        for (int i = 0; i < 64; i++) begin
          checks++;
          if (int'(coef[i]) != ((c[i] < 0) ? -sat_mag(c[i]) : sat_mag(c[i]))) failures++;
        end
      end
      repeat (5) @(negedge clk);
    end
    checks++;
    if (exact == 0) failures++;
    $display("%0d blocks fitted their target length and decoded exactly", exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
