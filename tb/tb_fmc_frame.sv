// Frame workload test of fmc_top: one complete YUV 4:2:0 frame of 1280x720
// (HEVC test class E size; luma 1280x720, two chroma planes of 640x360) is
// written through the encoder into a frame-memory model and read back
// through the decoder, at each of the three target compression ratios.
//
// The picture is synthetic, generated here: smooth ramps, a textured region
// with noise, hard edges and flat areas.  Each burst carries two horizontally
// adjacent 8x8 blocks (16 words, block after block), as the codec would write
// them.  The test checks:
//   * every compressed word in memory against the reference coder, and every
//     burst length on the memory side (12/10/8 beats);
//   * every decoded pixel against the reference decoder and inverse DWT;
//   * the rates over the whole frame: with the codec sending continuously the
//     encoder never stalls it, so the frame enters in exactly one cycle per
//     word (8 pixels/cycle), and with memory answering continuously the
//     decoder delivers the frame in one cycle per row of 8 pixels;
//   * the reconstruction quality: PSNR of each plane is printed, and a higher
//     ratio (fewer bits) must not give a better frame PSNR.
module tb_fmc_frame;
  import fmc_pkg::*;
  import fmc_ref_pkg::*;

  localparam int YW = 1280, YH = 720;
  localparam int CW = YW / 2, CH = YH / 2;
  localparam int NBY = (YW / 8) * (YH / 8);     // luma blocks
  localparam int NBC = (CW / 8) * (CH / 8);     // blocks per chroma plane
  localparam int NBLK = NBY + 2 * NBC;          // multiple of 2: bursts of two blocks
  localparam int NPAIR = NBLK / 2;

  logic clk = 0, rst_n = 0;
  logic [1:0] cr_mode = 0;
  logic cw_aw_valid = 0, cw_aw_ready; logic [31:0] cw_aw_addr = 0; logic [7:0] cw_aw_len = 0;
  logic cw_valid = 0, cw_ready; logic [63:0] cw_data = 0;
  logic mw_aw_valid, mw_aw_ready = 1; logic [31:0] mw_aw_addr; logic [7:0] mw_aw_len;
  logic mw_valid, mw_last; logic [63:0] mw_data;
  logic cr_ar_valid = 0, cr_ar_ready; logic [31:0] cr_ar_addr = 0; logic [7:0] cr_ar_len = 0;
  logic mr_ar_valid, mr_ar_ready = 1; logic [31:0] mr_ar_addr; logic [7:0] mr_ar_len;
  logic mr_valid = 0, mr_ready; logic [63:0] mr_data = 0;
  logic cr_valid; logic [63:0] cr_data;

  fmc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the frame, block by block: 0..NBY-1 luma, then Cb, then Cr, raster order
  byte unsigned org [NBLK][64];
  byte unsigned rec [NBLK][64];          // expected reconstruction
  logic [63:0]  cw_exp [NBLK][6];        // expected compressed words
  logic [63:0]  mem [int];

  function automatic int blk_plane(int b);
    return (b < NBY) ? 0 : (b < NBY + NBC) ? 1 : 2;
  endfunction

  task automatic make_frame();
    for (int b = 0; b < NBLK; b++) begin
      int pl, lb, wb, bx, by;
      pl = blk_plane(b);
      lb = (pl == 0) ? b : (pl == 1) ? b - NBY : b - NBY - NBC;
      wb = (pl == 0) ? YW / 8 : CW / 8;
      bx = lb % wb; by = lb / wb;
      for (int i = 0; i < 64; i++) begin
        int x, y, v;
        x = bx * 8 + i % 8; y = by * 8 + i / 8;
        if (pl == 0) begin
          if (y < 240)      v = (x * 200) / YW + (y * 40) / 240;                   // ramps
          else if (y < 480) v = ((x / 32 + y / 32) % 2 == 0) ? 70 : 180;           // checkerboard edges
          else if (x < 640) v = 128 + int'($urandom_range(0, 40)) - 20 + ((x ^ y) & 15); // texture
          else              v = 90;                                               // flat
        end else begin
          v = 128 + ((pl == 1) ? 1 : -1) * ((x + y) % 64 - 32) / 2 + int'($urandom_range(0, 4));
        end
        org[b][i] = 8'(clamp8(v));
      end
    end
  endtask

  task automatic make_reference(input int tbl);
    for (int b = 0; b < NBLK; b++) begin
      int px[64], c[64], d[64], p[64], len;
      bit rbs[384];
      for (int i = 0; i < 64; i++) px[i] = int'(org[b][i]);
      dwt(px, c);
      encode(c, tbl, rbs, len);
      decode(rbs, tbl, d);
      idwt(d, p);
      for (int i = 0; i < 64; i++) rec[b][i] = 8'(clamp8(p[i]));
      for (int w = 0; w < 6; w++)
        for (int k = 0; k < 64; k++) cw_exp[b][w][k] = (w * 64 + k < 384) ? rbs[w*64 + k] : 1'b0;
    end
  endtask

  // ---------------- memory model ----------------
  int aw_q [$];
  int wbase, wcnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (mw_aw_valid && mw_aw_ready) begin
      aw_q.push_back(int'(mw_aw_addr));
      checks++;
      if (int'(mw_aw_len) + 1 != 2 * int'(tbl_words(cr_mode))) begin failures++; $display("AW len %0d", mw_aw_len); end
    end
    if (mw_valid) begin
      if (wcnt == 0) begin
        checks++;
        if (aw_q.size() == 0) begin failures++; $display("write data without address"); end
        else wbase = aw_q.pop_front();
      end
      mem[wbase + 8 * wcnt] = mw_data;
      wcnt++;
      if (wcnt == 2 * int'(tbl_words(cr_mode))) wcnt = 0;
    end
  end

  int ar_q [$];
  always @(posedge clk) if (rst_n && mr_ar_valid && mr_ar_ready) begin
    ar_q.push_back(int'(mr_ar_addr));
    checks++;
    if (int'(mr_ar_len) + 1 != 2 * int'(tbl_words(cr_mode))) begin failures++; $display("AR len %0d", mr_ar_len); end
  end

  // read data: one burst after the other, valid held while words remain
  int rd_a = 0, rd_k = 0, rd_l = 0;
  always @(posedge clk) if (rst_n) begin
    bit idle;
    idle = (rd_l == 0) || (mr_valid && mr_ready && rd_k + 1 == rd_l);
    if (mr_valid && mr_ready) rd_k <= rd_k + 1;
    if (idle) begin
      if (ar_q.size() > 0) begin
        rd_a <= ar_q.pop_front();
        rd_k <= 0;
        rd_l <= 2 * int'(tbl_words(cr_mode));
      end else begin
        rd_k <= 0;
        rd_l <= 0;
      end
    end
  end
  always @(negedge clk) begin
    mr_valid = rd_k < rd_l;
    mr_data  = mem.exists(rd_a + 8 * rd_k) ? mem[rd_a + 8 * rd_k] : 64'd0;
  end

  // ---------------- pixels back to the codec ----------------
  int rb = 0, rrow = 0;
  longint first_rd = -1, last_rd = 0;
  real sse [3];
  always @(posedge clk) if (rst_n && cr_valid) begin
    if (first_rd < 0) first_rd = cyc;
    last_rd = cyc;
    for (int c = 0; c < 8; c++) begin
      int got, i;
      i = rrow * 8 + c;
      got = int'(cr_data[c*8 +: 8]);
      checks++;
      if (rb >= NBLK || got != int'(rec[rb][i])) begin
        failures++;
        if (failures < 10) $display("block %0d row %0d px %0d: got %0d", rb, rrow, c, got);
      end else
        sse[blk_plane(rb)] += real'((got - int'(org[rb][i])) * (got - int'(org[rb][i])));
    end
    rrow++;
    if (rrow == 8) begin rrow = 0; rb++; end
  end

  function automatic real psnr(real s, int n);
    if (s == 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 * real'(n) / s);
  endfunction

  // ---------------- write and read the frame ----------------
  int n_stall;
  bit aw_done;
  always @(posedge clk) if (rst_n && cw_valid && !cw_ready) n_stall++;

  initial begin
    real fr_psnr [3];
    make_frame();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      longint t0, t1;
      cr_mode = 2'(m);
      make_reference(int'(tbl_bits(cr_mode)));
      mem.delete();
      // address requests: one per burst, issued ahead of the data
      aw_done = 0;
      fork
        for (int q = 0; q < NPAIR; q++) begin
          @(negedge clk);
          cw_aw_valid = 1; cw_aw_addr = 32'(q * 128); cw_aw_len = 8'd15;
          @(posedge clk);
          while (!cw_aw_ready) @(posedge clk);
          @(negedge clk);
          cw_aw_valid = 0;
          if (q == NPAIR - 1) aw_done = 1;
        end
      join_none
      // pixel words, continuously
      @(negedge clk);
      cw_valid = 1;
      t0 = -1;
      for (int b = 0; b < NBLK; b++)
        for (int r = 0; r < 8; r++) begin
          for (int k = 0; k < 8; k++) cw_data[k*8 +: 8] = org[b][r*8+k];
          @(posedge clk);
          while (!cw_ready) @(posedge clk);
          if (t0 < 0) begin t0 = cyc; n_stall = 0; end
          t1 = cyc;
          @(negedge clk);
        end
      cw_valid = 0;
      checks++;
      if (t1 - t0 + 1 != longint'(NBLK * 8) || n_stall != 0) begin
        failures++;
        $display("mode %0d: %0d words took %0d cycles, %0d stalls", m, NBLK * 8, t1 - t0 + 1, n_stall);
      end
      wait (aw_done);
      repeat (60) @(negedge clk);
      // compressed frame against the reference
      for (int b = 0; b < NBLK; b++)
        for (int w = 0; w < int'(tbl_words(cr_mode)); w++) begin
          int a;
          a = 128 * (b / 2) + 8 * ((b % 2) * int'(tbl_words(cr_mode)) + w);
          checks++;
          if (!mem.exists(a) || mem[a] != cw_exp[b][w]) begin
            failures++;
            if (failures < 10) $display("mode %0d block %0d word %0d wrong in memory", m, b, w);
          end
        end
      // read the frame back
      rb = 0; rrow = 0; first_rd = -1;
      for (int p = 0; p < 3; p++) sse[p] = 0.0;
      for (int q = 0; q < NPAIR; q++) begin
        @(negedge clk);
        cr_ar_valid = 1; cr_ar_addr = 32'(q * 128); cr_ar_len = 8'd15;
        @(posedge clk);
        while (!cr_ar_ready) @(posedge clk);
      end
      @(negedge clk);
      cr_ar_valid = 0;
      while (rb < NBLK) @(negedge clk);
      checks++;
      if (last_rd - first_rd + 1 != longint'(NBLK * 8)) begin
        failures++;
        $display("mode %0d: frame read back in %0d cycles, want %0d", m, last_rd - first_rd + 1, NBLK * 8);
      end
      fr_psnr[m] = psnr(sse[0] + sse[1] + sse[2], NBLK * 64);
      $display("CR %s: frame of %0d blocks, PSNR Y %0.2f dB, Cb %0.2f dB, Cr %0.2f dB, all %0.2f dB; %0d cycles in, %0d cycles out",
               (m == 0) ? "25%" : (m == 1) ? "37.5%" : "50%", NBLK,
               psnr(sse[0], NBY * 64), psnr(sse[1], NBC * 64), psnr(sse[2], NBC * 64), fr_psnr[m],
               t1 - t0 + 1, last_rd - first_rd + 1);
      repeat (20) @(negedge clk);
    end
    checks++;
    if (!(fr_psnr[0] >= fr_psnr[1] && fr_psnr[1] >= fr_psnr[2])) begin
      failures++;
      $display("PSNR does not fall with the compression ratio");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
