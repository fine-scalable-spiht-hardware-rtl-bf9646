// Self-checking test of spiht_core: codes wavelet blocks (from smooth,
// textured and random pixel blocks, and raw random coefficients) at all three
// target lengths and compares the bitstream with the reference coder.  The
// planes are fed with the encoder's schedule (sign and planes 8..4, two idle
// cycles, planes 3..0) and done must come 3 cycles after plane 0, i.e. the
// block occupies 12 active cycles.
module tb_spiht_core;
  import fmc_pkg::*;
  import fmc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic plane_valid = 0, plane_sign = 0;
  logic [3:0] plane_num = 0;
  logic [63:0] plane = 0;
  logic [POS_W-1:0] tbl = 384;
  logic done;
  logic [TBL_MAX-1:0] bs;
  int checks = 0, failures = 0;

  spiht_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pix[64], c[64], mag[64], len;
    bit rbs[384];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      case (t % 4)
        0: for (int i = 0; i < 64; i++) pix[i] = $urandom_range(0, 255);
        1: for (int i = 0; i < 64; i++) pix[i] = 80 + (i % 8) * 4 + (i / 8) * 3 + $urandom_range(0, 3);
        2: for (int i = 0; i < 64; i++) pix[i] = ((i % 8) < 4) ? 30 : 200;
        default: ;
      endcase
      if (t % 4 == 3) for (int i = 0; i < 64; i++) c[i] = int'($urandom_range(0, 1200)) - 600;
      else dwt(pix, c);
      tbl = tbl_bits(2'(t % 3));
      encode(c, int'(tbl), rbs, len);
      for (int i = 0; i < 64; i++) mag[i] = sat_mag(c[i]);
      @(negedge clk);
      plane_valid = 1; plane_sign = 1;
      for (int i = 0; i < 64; i++) plane[i] = c[i] < 0;
      for (int n = 8; n >= 0; n--) begin
        @(negedge clk);
        if (n == 3) begin
          plane_valid = 0;
          @(negedge clk); @(negedge clk);
          plane_valid = 1;
        end
        plane_sign = 0; plane_num = 4'(n);
        for (int i = 0; i < 64; i++) plane[i] = mag[i][n];
      end
      @(negedge clk);
      plane_valid = 0;
      // plane 0 was presented in the previous cycle; done expected 3 cycles after it
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("done early"); end
      @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("block %0d: done not at cycle 12", t); end
      begin automatic int f0 = failures;
      for (int i = 0; i < 384; i++) begin
        checks++;
        if (bs[i] != rbs[i]) begin
          failures++;
          if (0) $display("block %0d tbl %0d bit %0d: got %0d want %0d", t, tbl, i, bs[i], rbs[i]);
        end
      end
      if (failures != f0) $display("block %0d (kind %0d, tbl %0d, len %0d): %0d bits differ", t, t % 4, tbl, len, failures - f0);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
