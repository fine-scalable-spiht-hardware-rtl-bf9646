// Self-checking test of fmc_transpose: blocks of random coefficients (some
// beyond the 9-bit magnitude range) are loaded every pipe time or with gaps;
// each core must see its block's sign plane and planes 8..4 in cycles 0..5
// of the next pipe time and planes 3..0 in cycles 0..3 of the one after,
// with even blocks on core 0 and odd blocks on core 1.
module tb_fmc_transpose;
  import fmc_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [2:0] pc = 0;
  coef_t coef [NCOEF];
  logic plane_valid [2], plane_sign [2];
  logic [3:0] plane_num [2];
  logic [NCOEF-1:0] plane_bits [2];
  int checks = 0, failures = 0;

  fmc_transpose dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected plane of block b: p = 0 sign, 1..9 magnitude bits 8..0
  int cv [64][64];
  function automatic logic [63:0] exp_plane(int b, int p);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) begin
      int m;
      m = (cv[b][i] < 0) ? -cv[b][i] : cv[b][i];
      if (m > 511) m = 511;
      r[i] = (p == 0) ? (cv[b][i] < 0) : m[9 - p];
    end
    return r;
  endfunction

  // pipe slots: slot s carries block slot_blk[s] (-1 = none)
  int slot_blk [80];
  always @(posedge clk) if (rst_n) pc <= pc + 3'd1;

  initial begin
    int nb, s;
    nb = 0;
    for (int i = 0; i < 80; i++) slot_blk[i] = -1;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // rst released with pc = 0 at the next edge
    for (s = 0; s < 70; s++) begin
      // cycle pc = 0 of slot s
      if (s < 60 && (s % 7 != 3)) begin
        for (int i = 0; i < 64; i++) begin
          cv[nb][i] = int'($urandom_range(0, 1400)) - 700;
          coef[i] = coef_t'(cv[nb][i]);
        end
        slot_blk[s] = nb;
        nb++;
        load = 1;
      end
      for (int c = 0; c < 8; c++) begin
        int b1, b2;
        #1;
        b1 = (s >= 1) ? slot_blk[s-1] : -1;     // transposed last slot: upper planes now
        b2 = (s >= 2) ? slot_blk[s-2] : -1;     // lower planes now
        for (int k = 0; k < 2; k++) begin
          logic ev; logic [3:0] en; logic es; logic [63:0] eb;
          ev = 0; en = 0; es = 0; eb = 0;
          if (b1 >= 0 && b1 % 2 == k && c < 6) begin ev = 1; es = (c == 0); en = 4'(9 - c); eb = exp_plane(b1, c); end
          else if (b2 >= 0 && b2 % 2 == k && c < 4) begin ev = 1; en = 4'(3 - c); eb = exp_plane(b2, 6 + c); end
          checks++;
          if (plane_valid[k] != ev) begin failures++; $display("slot %0d cyc %0d core %0d valid %0d", s, c, k, plane_valid[k]); end
          else if (ev) begin
            checks++;
            if (plane_bits[k] != eb || plane_sign[k] != es || (c > 0 && plane_num[k] != en)) begin
              failures++;
              if (failures < 10) $display("slot %0d cyc %0d core %0d plane mismatch", s, c, k);
            end
          end
        end
        @(negedge clk);
        load = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
