// End-to-end test of fmc_top at its default sizes: a codec model writes
// 8x8 blocks in 16-beat bursts (two blocks each) through the encoder into a
// frame-memory model, then reads them back through the decoder, at all three
// compression ratios.  Every compressed word in memory is compared with the
// reference DWT and coder, every pixel read back with the reference decoder
// and inverse DWT, and every burst length on the bus side with 12/10/8.
// Mechanisms that must each happen at least once: both encoder cores, both
// decoder cores, the bit-plane buffer feeding a core, a bitstream cut at its
// target length, a bitstream that fits without cutting, each of the three
// ratios, an encoder input stall, a decoder input stall, a shortened write
// burst, a shortened read burst and a stalled address channel.
module tb_fmc_top;
  import fmc_pkg::*;
  import fmc_ref_pkg::*;

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
  localparam int NPAIR = 8;          // bursts per ratio
  localparam int NB = 2 * NPAIR;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_core_e [2], n_core_d [2], n_buf, n_cut, n_fit, n_cr [3], n_enc_stall, n_dec_stall, n_aw_short, n_ar_short, n_aw_stall;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_enc.done[0]) n_core_e[0]++;
    if (dut.u_enc.done[1]) n_core_e[1]++;
    if (dut.u_dec.done[0]) n_core_d[0]++;
    if (dut.u_dec.done[1]) n_core_d[1]++;
    if (dut.u_enc.u_tr.bf_act && dut.u_enc.u_tr.pc < 3'd4) n_buf++;
    if (cw_valid && !cw_ready) n_enc_stall++;
    if (mr_valid && !mr_ready) n_dec_stall++;
    if (mw_aw_valid && !mw_aw_ready) n_aw_stall++;
  end

  int pix [NB][64];
  logic [63:0] mem [int];
  int exp_words [NB];

  // frame-memory write side: address requests and compressed words
  int aw_q [$];
  int wbase = -1, wcnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (mw_aw_valid && mw_aw_ready) begin
      aw_q.push_back(int'(mw_aw_addr));
      checks++;
      if (int'(mw_aw_len) + 1 != 2 * int'(tbl_words(cr_mode))) begin failures++; $display("AW len %0d", mw_aw_len); end
      else n_aw_short++;
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

  // frame-memory read side
  int ar_q [$];
  int ar_len_q [$];
  always @(posedge clk) if (rst_n && mr_ar_valid && mr_ar_ready) begin
    ar_q.push_back(int'(mr_ar_addr));
    ar_len_q.push_back(int'(mr_ar_len) + 1);
    checks++;
    if (int'(mr_ar_len) + 1 != 2 * int'(tbl_words(cr_mode))) begin failures++; $display("AR len %0d", mr_ar_len); end
    else n_ar_short++;
  end
  initial begin
    forever begin
      @(negedge clk);
      if (ar_q.size() > 0) begin
        int a, l;
        a = ar_q.pop_front();
        l = ar_len_q.pop_front();
        for (int k = 0; k < l; k++) begin
          mr_valid = 1;
          mr_data = mem.exists(a + 8 * k) ? mem[a + 8 * k] : 64'd0;
          @(posedge clk);
          while (!mr_ready) @(posedge clk);
          @(negedge clk);
          mr_valid = 0;
        end
      end
    end
  end

  // pixels back to the codec
  int rb = 0, rrow = 0;
  int exp_pix [NB][64];
  always @(posedge clk) if (rst_n && cr_valid) begin
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (int'(cr_data[c*8 +: 8]) != exp_pix[rb][rrow*8+c]) begin
        failures++;
        if (failures < 10) $display("read block %0d row %0d px %0d: got %0d want %0d", rb, rrow, c, cr_data[c*8 +: 8], exp_pix[rb][rrow*8+c]);
      end
    end
    rrow++;
    if (rrow == 8) begin rrow = 0; rb++; end
  end

  task automatic send_aw(input int addr, output int dummy);
    @(negedge clk);
    cw_aw_valid = 1; cw_aw_addr = addr; cw_aw_len = 8'd15;
    @(posedge clk);
    while (!cw_aw_ready) @(posedge clk);
    @(negedge clk);
    cw_aw_valid = 0;
    dummy = 0;
  endtask

  initial begin
    int c[64], d[64], p[64], len, tb_, dmy;
    bit rbs[384];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      cr_mode = 2'(m);
      n_cr[m]++;
      tb_ = int'(tbl_bits(cr_mode));
      // a small synthetic picture: gradients, texture, edges and flat areas
      for (int b = 0; b < NB; b++)
        for (int i = 0; i < 64; i++)
          case (b % 4)
            0: pix[b][i] = 40 + 8 * (i % 8) + 4 * (i / 8) + $urandom_range(0, 3);
            1: pix[b][i] = $urandom_range(0, 255);
            2: pix[b][i] = ((i % 8) + (i / 8) < 7) ? 20 : 230;
            default: pix[b][i] = 128;
          endcase
      for (int b = 0; b < NB; b++) begin
        dwt(pix[b], c);
        encode(c, tb_, rbs, len);
        if (len > tb_) n_cut++; else n_fit++;
        decode(rbs, tb_, d);
        idwt(d, p);
        for (int i = 0; i < 64; i++) exp_pix[b][i] = clamp8(p[i]);
        // expected memory words
        for (int w = 0; w < tb_ / 64; w++) begin
          logic [63:0] ew;
          for (int k = 0; k < 64; k++) ew[k] = rbs[w*64 + k];
          mem[32'h1000 * m + 128 * (b / 2) + 8 * ((b % 2) * (tb_ / 64) + w) + 32'h100000] = ew;
        end
      end
      // write phase: address then 16 pixel words per pair of blocks
      mw_aw_ready = 1;
      for (int q = 0; q < NPAIR; q++) begin
        if (q == 2) mw_aw_ready = 0;
        send_aw(32'h1000 * m + 128 * q, dmy);
        if (q == 2) begin repeat (3) @(negedge clk); mw_aw_ready = 1; end
        for (int b = 2 * q; b < 2 * q + 2; b++)
          for (int r = 0; r < 8; r++) begin
            @(negedge clk);
            cw_valid = 1;
            for (int k = 0; k < 8; k++) cw_data[k*8 +: 8] = 8'(pix[b][r*8+k]);
            @(posedge clk);
            while (!cw_ready) @(posedge clk);
          end
        @(negedge clk);
        cw_valid = 0;
        if (q % 3 == 1) repeat (3) @(negedge clk);   // misaligns the next burst: stalls
      end
      repeat (60) @(negedge clk);
      // memory contents against the reference
      for (int b = 0; b < NB; b++)
        for (int w = 0; w < tb_ / 64; w++) begin
          int a;
          a = 32'h1000 * m + 128 * (b / 2) + 8 * ((b % 2) * (tb_ / 64) + w);
          checks++;
          if (!mem.exists(a) || mem[a] != mem[a + 32'h100000]) begin
            failures++;
            if (failures < 10) $display("mode %0d block %0d word %0d wrong in memory", m, b, w);
          end
        end
      // read phase
      rb = 0; rrow = 0;
      for (int q = 0; q < NPAIR; q++) begin
        @(negedge clk);
        cr_ar_valid = 1; cr_ar_addr = 32'h1000 * m + 128 * q; cr_ar_len = 8'd15;
        @(posedge clk);
        while (!cr_ar_ready) @(posedge clk);
        @(negedge clk);
        cr_ar_valid = 0;
      end
      repeat (300) @(negedge clk);
      checks++;
      if (rb != NB) begin failures++; $display("mode %0d: %0d blocks read back", m, rb); end
    end
    // every mechanism must have happened
    begin
      int cnt [14];
      string nm [14];
      cnt = '{n_core_e[0], n_core_e[1], n_core_d[0], n_core_d[1], n_buf, n_cut, n_fit,
              n_cr[0], n_cr[1], n_cr[2], n_enc_stall, n_dec_stall, n_aw_short + n_ar_short, n_aw_stall};
      nm = '{"encoder core 0", "encoder core 1", "decoder core 0", "decoder core 1", "bit-plane buffer read",
             "bitstream cut at target", "bitstream fits", "CR 25%", "CR 37.5%", "CR 50%",
             "encoder input stall", "decoder input stall", "shortened bursts", "address channel stall"};
      for (int k = 0; k < 14; k++) begin
        checks++;
        $display("%-26s %0d", nm[k], cnt[k]);
        if (cnt[k] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
