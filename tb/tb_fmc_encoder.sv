// Self-checking test of fmc_encoder: sends blocks back to back (one row per
// cycle) and with gaps, at all three compression ratios, and compares every
// output word with the reference DWT and coder.  Also checks the rate (one
// block per 8 cycles when the input is continuous), the fixed latency from
// the first row to the first output word, the word count per block and that
// both cores are used.
module tb_fmc_encoder;
  import fmc_pkg::*;
  import fmc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] cr_mode = 0;
  logic in_valid = 0, in_ready;
  logic [63:0] in_data = 0;
  logic out_valid, out_last;
  logic [63:0] out_data;
  int checks = 0, failures = 0;
  localparam int NB = 48;

  fmc_encoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pix [NB][64];
  int start_cyc [NB];
  int first_out [NB];
  int cyc = 0;
  always @(posedge clk) cyc++;

  // receiver
  int ob = 0, ow = 0;
  logic [TBL_MAX-1:0] got;
  always @(posedge clk) if (rst_n && out_valid) begin
    got[ow*64 +: 64] = out_data;
    if (ow == 0) first_out[ob] = cyc;
    ow++;
    if (out_last) begin
      int c[64], len;
      bit rbs[384];
      int tb_;
      tb_ = int'(tbl_bits(cr_mode));
      dwt(pix[ob], c);
      encode(c, tb_, rbs, len);
      checks++;
      if (ow != tb_ / 64) begin failures++; $display("block %0d: %0d words", ob, ow); end
      for (int i = 0; i < tb_; i++) begin
        checks++;
        if (got[i] != rbs[i]) failures++;
      end
      ob++; ow = 0;
    end
  end

  int used0 = 0, used1 = 0;
  always @(posedge clk) begin
    if (dut.done[0]) used0++;
    if (dut.done[1]) used1++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 64; i++)
        case (b % 3)
          0: pix[b][i] = $urandom_range(0, 255);
          1: pix[b][i] = 60 + (i % 8) * 5 + (i / 8) * 2 + $urandom_range(0, 6);
          default: pix[b][i] = 128 + ((i % 8) - 4) * ((i / 8) - 4);
        endcase
    end
    for (int b = 0; b < NB; b++) begin
      if (b % 16 == 0) cr_mode = 2'(b / 16);
      for (int r = 0; r < 8; r++) begin
        @(negedge clk);
        in_valid = 1;
        for (int c = 0; c < 8; c++) in_data[c*8 +: 8] = 8'(pix[b][r*8+c]);
        while (!in_ready) @(negedge clk);
        if (r == 0) start_cyc[b] = cyc;
        @(posedge clk);
      end
      // gaps between blocks now and then, and a long one before a CR change
      if (b % 16 == 15) begin @(negedge clk); in_valid = 0; repeat (60) @(negedge clk); end
      else if (b % 5 == 4) begin @(negedge clk); in_valid = 0; repeat ($urandom_range(1, 12)) @(negedge clk); end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (80) @(negedge clk);
    checks++;
    if (ob != NB) begin failures++; $display("only %0d blocks out", ob); end
    for (int b = 0; b < ob; b++) begin
      checks++;
      if (first_out[b] - start_cyc[b] != first_out[0] - start_cyc[0]) begin
        failures++; $display("block %0d latency %0d", b, first_out[b] - start_cyc[b]);
      end
    end
    // back-to-back blocks 1,2 (no gap between them) must be 8 cycles apart
    checks++;
    if (first_out[2] - first_out[1] != 8) begin failures++; $display("rate: %0d", first_out[2] - first_out[1]); end
    checks++;
    if (used0 == 0 || used1 == 0) failures++;
    $display("latency %0d cycles, core0 %0d blocks, core1 %0d blocks", first_out[0] - start_cyc[0], used0, used1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
