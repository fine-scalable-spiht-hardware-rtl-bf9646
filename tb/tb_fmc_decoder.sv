// Self-checking test of fmc_decoder: block bitstreams made by the reference
// DWT and coder at all three compression ratios are sent in (back to back and
// with gaps), and every output row is compared with the reference decoder
// followed by the reference inverse DWT.  Checks the rate (one block per 8
// cycles for continuous input), a constant latency and that both cores work.
module tb_fmc_decoder;
  import fmc_pkg::*;
  import fmc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] cr_mode = 0;
  logic in_valid = 0, in_ready;
  logic [63:0] in_data = 0;
  logic out_valid;
  logic [63:0] out_data;
  int checks = 0, failures = 0;
  localparam int NB = 48;

  fmc_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expect_pix [NB][64];
  logic [383:0] stream [NB];
  int first_in [NB], first_out [NB];
  int cyc = 0;
  always @(posedge clk) cyc++;

  int ob = 0, orow = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    if (orow == 0) first_out[ob] = cyc;
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (int'(out_data[c*8 +: 8]) != expect_pix[ob][orow*8+c]) begin
        failures++;
        if (failures < 10) $display("block %0d row %0d px %0d: got %0d want %0d", ob, orow, c, out_data[c*8 +: 8], expect_pix[ob][orow*8+c]);
      end
    end
    orow++;
    if (orow == 8) begin orow = 0; ob++; end
  end

  int used0 = 0, used1 = 0;
  always @(posedge clk) begin
    if (dut.done[0]) used0++;
    if (dut.done[1]) used1++;
  end

  initial begin
    int pix[64], c[64], d[64], p[64], len, tb_, nw;
    bit rbs[384];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 64; i++)
        case (b % 3)
          0: pix[i] = $urandom_range(0, 255);
          1: pix[i] = 60 + (i % 8) * 5 + (i / 8) * 2 + $urandom_range(0, 6);
          default: pix[i] = 128 + ((i % 8) - 4) * ((i / 8) - 4);
        endcase
      tb_ = int'(tbl_bits(2'(b / 16)));
      dwt(pix, c);
      encode(c, tb_, rbs, len);
      decode(rbs, tb_, d);
      idwt(d, p);
      for (int i = 0; i < 64; i++) expect_pix[b][i] = clamp8(p[i]);
      for (int i = 0; i < 384; i++) stream[b][i] = rbs[i];
    end
    for (int b = 0; b < NB; b++) begin
      if (b % 16 == 0) cr_mode = 2'(b / 16);
      nw = int'(tbl_words(cr_mode));
      for (int w = 0; w < nw; w++) begin
        @(negedge clk);
        in_valid = 1;
        in_data = stream[b][w*64 +: 64];
        while (!in_ready) @(negedge clk);
        if (w == 0) first_in[b] = cyc;
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
      if (b % 16 == 15) repeat (60) @(negedge clk);
      else if (b % 7 == 6) repeat ($urandom_range(1, 20)) @(negedge clk);
    end
    repeat (80) @(negedge clk);
    checks++;
    if (ob != NB) begin failures++; $display("only %0d blocks out", ob); end
    // blocks 1..5 were sent back to back: outputs must be 8 cycles apart
    for (int b = 2; b < 6; b++) begin
      checks++;
      if (first_out[b] - first_out[b-1] != 8) begin failures++; $display("rate: block %0d after %0d cycles", b, first_out[b] - first_out[b-1]); end
    end
    checks++;
    if (used0 == 0 || used1 == 0) failures++;
    $display("first block: in at %0d, out at %0d; core0 %0d core1 %0d blocks", first_in[0], first_out[0], used0, used1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
