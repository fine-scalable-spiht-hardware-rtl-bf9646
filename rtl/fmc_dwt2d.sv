// Two-level 2D discrete wavelet transform of one 8x8 pixel block.
//
// Rows arrive one per cycle (8 pixels, row_idx 0..7).  Each row gets its
// level-1 horizontal transform on arrival and is stored in a row buffer.  In
// the cycle the last row (row_idx 7) arrives, the vertical level-1 transform
// of all eight columns and the complete level-2 transform of the 4x4 LL1
// quadrant (horizontal then vertical) are computed and the 64 coefficients
// are registered; coef_valid pulses in the following cycle and coef holds
// its value until the next block completes.  So the block is transformed as
// it streams in, with one cycle of latency after its last row.
//
// Splitting the 2D transform into horizontal and vertical 1D transforms and
// doing it on the fly follows the FMC design this codec implements.  The
// filter (reversible integer 5/3 lifting with symmetric extension) and the
// Mallat coefficient layout (see fmc_pkg) are this design's choices.
module fmc_dwt2d
  import fmc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     row_valid,
  input  logic [2:0]               row_idx,
  input  logic [BLK*PIX_W-1:0]     row_pix,   // pixel c in bits 8c+7:8c
  output logic                     coef_valid,
  output coef_t                    coef [NCOEF]
);

  coef_t rowbuf [BLK][BLK];   // horizontally transformed rows
  vec8_t cur_row;             // incoming row after the horizontal transform
  blk_t  coef_nx;

  always_comb begin
    vec8_t x;
    for (int c = 0; c < BLK; c++)
      x[c] = coef_t'({1'b0, row_pix[c*PIX_W +: PIX_W]});
    cur_row = lift53_fwd(x, BLK);
  end

  // Vertical level-1 and full level-2 transform, used when row 7 arrives.
  always_comb begin
    coef_t m [BLK][BLK];
    vec8_t v;
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++)
        m[r][c] = (r == BLK - 1) ? cur_row[c] : rowbuf[r][c];
    // level 1, columns
    for (int c = 0; c < BLK; c++) begin
      for (int r = 0; r < BLK; r++) v[r] = m[r][c];
      v = lift53_fwd(v, BLK);
      for (int r = 0; r < BLK; r++) m[r][c] = v[r];
    end
    // level 2, rows of LL1
    for (int r = 0; r < BLK / 2; r++) begin
      for (int c = 0; c < BLK; c++) v[c] = (c < BLK / 2) ? m[r][c] : '0;
      v = lift53_fwd(v, BLK / 2);
      for (int c = 0; c < BLK / 2; c++) m[r][c] = v[c];
    end
    // level 2, columns of LL1
    for (int c = 0; c < BLK / 2; c++) begin
      for (int r = 0; r < BLK; r++) v[r] = (r < BLK / 2) ? m[r][c] : '0;
      v = lift53_fwd(v, BLK / 2);
      for (int r = 0; r < BLK / 2; r++) m[r][c] = v[r];
    end
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++)
        coef_nx[r*BLK + c] = m[r][c];
  end

  always_ff @(posedge clk) begin
    if (row_valid)
      for (int c = 0; c < BLK; c++)
        rowbuf[row_idx][c] <= cur_row[c];
    if (row_valid && row_idx == 3'(BLK - 1))
      coef <= coef_nx;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) coef_valid <= 1'b0;
    else        coef_valid <= row_valid && row_idx == 3'(BLK - 1);
  end

endmodule
