// FMC encoder: compresses 8x8 blocks of 8-bit pixels, arriving 8 pixels
// (one 64-bit bus word, one block row) per cycle, into fixed-size bitstreams
// of 384, 320 or 256 bits (6, 5 or 4 words) for target compression ratios of
// 25%, 37.5% and 50% (cr_mode 0, 1, 2).
//
// Everything runs on a pipe time of 8 cycles (pc = 0..7), one block per pipe
// time, through five stages:
//   pipe k   : the block's rows enter the 2D DWT (row r in cycle r);
//   pipe k+1 : transpose of the coefficients into bit-planes;
//   pipe k+2 : SPIHT core (block parity) codes the sign plane and planes 8..4
//              (6 cycles), the lower planes go to its bit-plane buffer;
//   pipe k+3 : the same core codes planes 3..0 and drains (6 cycles) while
//              the other core starts on the next block;
//   pipe k+4 : the output multiplexer sends the block's words.
// A single SPIHT core needs 12 cycles per block, more than one pipe time, so
// even and odd blocks go to two cores that overlap by one pipe time; DWT and
// transpose are shared.  This dual-core arrangement and its schedule follow
// the FMC design.  The input handshake is this design's: row r of a block is
// accepted only in cycle r of a pipe time (in_ready), which keeps every stage
// aligned to the pipe; back-to-back blocks flow without stalls.  cr_mode is
// expected to stay constant while blocks are in flight.
module fmc_encoder
  import fmc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        cr_mode,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [BUS_W-1:0]  in_data,
  output logic              out_valid,
  output logic [BUS_W-1:0]  out_data,
  output logic              out_last
);

  logic [2:0] pc, row_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc      <= '0;
      row_cnt <= '0;
    end else begin
      pc <= pc + 3'd1;
      if (in_valid && in_ready) row_cnt <= row_cnt + 3'd1;
    end
  end

  assign in_ready = (pc == row_cnt);

  // 2D DWT
  logic  coef_valid;
  coef_t coef [NCOEF];
  fmc_dwt2d u_dwt (
    .clk, .rst_n, .row_valid(in_valid && in_ready), .row_idx(row_cnt), .row_pix(in_data),
    .coef_valid, .coef);

  // transpose and bit-plane buffers
  logic             pv [2], ps [2];
  logic [3:0]       pn [2];
  logic [NCOEF-1:0] pb [2];
  fmc_transpose u_tr (
    .clk, .rst_n, .pc, .load(coef_valid), .coef,
    .plane_valid(pv), .plane_sign(ps), .plane_num(pn), .plane_bits(pb));

  // dual SPIHT cores
  logic [POS_W-1:0]   tbl;
  logic [1:0]         done;
  logic [TBL_MAX-1:0] bs [2];
  assign tbl = tbl_bits(cr_mode);

  for (genvar k = 0; k < 2; k++) begin : g_core
    spiht_core u_core (
      .clk, .rst_n, .plane_valid(pv[k]), .plane_sign(ps[k]), .plane_num(pn[k]),
      .plane(pb[k]), .tbl, .done(done[k]), .bs(bs[k]));
  end

  fmc_enc_outmux u_out (
    .clk, .rst_n, .done, .bs, .nwords(tbl_words(cr_mode)),
    .out_valid, .out_data, .out_last);

endmodule
