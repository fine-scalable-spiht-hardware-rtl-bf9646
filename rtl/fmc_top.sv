// Frame-memory compression (FMC) unit placed between a video codec and the
// AXI bus to its frame memory.
//
// Write path: reconstructed frames leave the codec as bursts of 16 words of
// 64 bits (8 pixels each, two 8x8 blocks); the encoder compresses each block
// to 6, 5 or 4 words (target compression ratio 25%, 37.5%, 50%, cr_mode 0,
// 1, 2) and the write-address adapter shortens the burst to 12, 10 or 8
// beats.  Read path: a 16-beat read request from the codec becomes a 12-,
// 10- or 8-beat request to memory, and the decoder turns the returned words
// back into pixels, 8 per cycle.  Bus protocol signals other than the
// address request (valid/ready/address/length) and the data words are left
// to the surrounding bus logic: the data ports here are plain valid/ready
// streams.  Encoder and decoder are independent; cr_mode is shared and must
// be the same for writing and reading a frame.  Arrangement after the FMC
// design's system integration; port names and stream framing are this
// design's choices.
module fmc_top
  import fmc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        cr_mode,
  // codec -> FMC: write address and pixel data
  input  logic              cw_aw_valid,
  output logic              cw_aw_ready,
  input  logic [31:0]       cw_aw_addr,
  input  logic [7:0]        cw_aw_len,
  input  logic              cw_valid,
  output logic              cw_ready,
  input  logic [BUS_W-1:0]  cw_data,
  // FMC -> bus: write address and compressed data
  output logic              mw_aw_valid,
  input  logic              mw_aw_ready,
  output logic [31:0]       mw_aw_addr,
  output logic [7:0]        mw_aw_len,
  output logic              mw_valid,
  output logic [BUS_W-1:0]  mw_data,
  output logic              mw_last,
  // codec -> FMC -> bus: read address
  input  logic              cr_ar_valid,
  output logic              cr_ar_ready,
  input  logic [31:0]       cr_ar_addr,
  input  logic [7:0]        cr_ar_len,
  output logic              mr_ar_valid,
  input  logic              mr_ar_ready,
  output logic [31:0]       mr_ar_addr,
  output logic [7:0]        mr_ar_len,
  // bus -> FMC: compressed read data; FMC -> codec: pixels
  input  logic              mr_valid,
  output logic              mr_ready,
  input  logic [BUS_W-1:0]  mr_data,
  output logic              cr_valid,
  output logic [BUS_W-1:0]  cr_data
);

  fmc_axi_bl_adapter u_aw (
    .clk, .rst_n, .cr_mode,
    .s_valid(cw_aw_valid), .s_ready(cw_aw_ready), .s_addr(cw_aw_addr), .s_len(cw_aw_len),
    .m_valid(mw_aw_valid), .m_ready(mw_aw_ready), .m_addr(mw_aw_addr), .m_len(mw_aw_len));

  fmc_axi_bl_adapter u_ar (
    .clk, .rst_n, .cr_mode,
    .s_valid(cr_ar_valid), .s_ready(cr_ar_ready), .s_addr(cr_ar_addr), .s_len(cr_ar_len),
    .m_valid(mr_ar_valid), .m_ready(mr_ar_ready), .m_addr(mr_ar_addr), .m_len(mr_ar_len));

  fmc_encoder u_enc (
    .clk, .rst_n, .cr_mode,
    .in_valid(cw_valid), .in_ready(cw_ready), .in_data(cw_data),
    .out_valid(mw_valid), .out_data(mw_data), .out_last(mw_last));

  fmc_decoder u_dec (
    .clk, .rst_n, .cr_mode,
    .in_valid(mr_valid), .in_ready(mr_ready), .in_data(mr_data),
    .out_valid(cr_valid), .out_data(cr_data));

endmodule
