// Packer of the SPIHT encoder core: turns the variable-length outputs of all
// passes of one bit-plane into a continuous block bitstream.
//
// Stage 1 (combinational, registered at the clock edge): the 20 segments of a
// plane (13 passes: LL2 MRP, then SP and MRP of HL2, LH2, HH2, HL1, LH1, HH1;
// then the 7 sign segments LL2..HH1) are merged into one PW-bit word.  Each
// segment is shifted by the running total of the bits before it and OR-ed in,
// as in the shift-and-merge packer of the FMC design; with merged refinement
// passes there are 13 instead of 19 shifters in this chain.
// Stage 2 (next cycle): the word is shifted to the current bitstream length
// and OR-ed into the block bitstream; bits at or past the target bit length
// tbl are dropped, which is how the coder stops at its exact target size.
// clear empties the bitstream (first plane of a block).  Bit 0 of bs is the
// first bit of the block.  Latency: a plane's bits are in bs two cycles after
// in_valid.
module spiht_packer
  import fmc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic [POS_W-1:0]     tbl,
  input  logic [SEG_W-1:0]     seg_bits [20],
  input  logic [4:0]           seg_cnt  [20],
  output logic [TBL_MAX-1:0]   bs,
  output logic [POS_W-1:0]     bs_len,
  output logic                 app_valid   // stage 2 busy this cycle
);

  logic [PW-1:0]    word_nx, word_q;
  logic [7:0]       wcnt_nx, wcnt_q;
  logic             v_q;

  always_comb begin
    logic [7:0] off;
    word_nx = '0;
    off = '0;
    for (int s = 0; s < 20; s++) begin
      word_nx = word_nx | ((PW'(seg_bits[s]) & ((PW'(1) << seg_cnt[s]) - PW'(1))) << off);
      off = off + 8'(seg_cnt[s]);
    end
    wcnt_nx = off;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid && !clear;
    end
    word_q <= word_nx;
    wcnt_q <= wcnt_nx;
  end

  // Stage 2: append with truncation at tbl.
  logic [TBL_MAX+PW-1:0] shifted;
  logic [TBL_MAX-1:0]    keep;
  logic [POS_W+1:0]      sum;
  always_comb begin
    shifted = (TBL_MAX+PW)'(word_q) << bs_len;
    keep    = (TBL_MAX'(1) << tbl) - TBL_MAX'(1);
    if (tbl >= POS_W'(TBL_MAX)) keep = '1;
    sum     = (POS_W+2)'(bs_len) + (POS_W+2)'(wcnt_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      bs     <= '0;
      bs_len <= '0;
    end else if (v_q) begin
      bs     <= bs | (shifted[TBL_MAX-1:0] & keep);
      bs_len <= (sum > (POS_W+2)'(tbl)) ? tbl : POS_W'(sum);
    end
  end

  assign app_valid = v_q;

endmodule
