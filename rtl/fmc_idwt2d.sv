// Two-level inverse 2D DWT of one 8x8 coefficient block (reversible 5/3
// lifting, inverse of fmc_dwt2d), with pixels leaving one row per cycle.
//
// On load the level-2 inverse (columns then rows of the 4x4 LL1 quadrant)
// and the vertical level-1 inverse of all eight columns are computed and
// registered.  In the next 8 cycles row r = 0..7 gets its horizontal level-1
// inverse and is sent out (out_valid, 8 pixels clamped to 0..255, pixel c in
// bits 8c+7:8c), so one block takes one pipe time and the output is
// continuous for back-to-back loads (load every 8 cycles, in the cycle
// before the first row is wanted).  Doing the last 1D pass row by row on the
// way out, and the clamp, are this design's choices.
module fmc_idwt2d
  import fmc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  coef_t                coef [NCOEF],
  output logic                 out_valid,
  output logic [BLK*PIX_W-1:0] out_row
);

  coef_t cbuf [BLK][BLK];     // after the vertical level-1 inverse
  coef_t cbuf_nx [BLK][BLK];
  logic [2:0] row;
  logic       busy;

  always_comb begin
    vec8_t v;
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++)
        cbuf_nx[r][c] = coef[r*BLK + c];
    // level 2: columns, then rows of the 4x4 quadrant
    for (int c = 0; c < BLK / 2; c++) begin
      for (int r = 0; r < BLK; r++) v[r] = (r < BLK / 2) ? cbuf_nx[r][c] : '0;
      v = lift53_inv(v, BLK / 2);
      for (int r = 0; r < BLK / 2; r++) cbuf_nx[r][c] = v[r];
    end
    for (int r = 0; r < BLK / 2; r++) begin
      for (int c = 0; c < BLK; c++) v[c] = (c < BLK / 2) ? cbuf_nx[r][c] : '0;
      v = lift53_inv(v, BLK / 2);
      for (int c = 0; c < BLK / 2; c++) cbuf_nx[r][c] = v[c];
    end
    // level 1: columns
    for (int c = 0; c < BLK; c++) begin
      for (int r = 0; r < BLK; r++) v[r] = cbuf_nx[r][c];
      v = lift53_inv(v, BLK);
      for (int r = 0; r < BLK; r++) cbuf_nx[r][c] = v[r];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      row  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      row  <= '0;
    end else if (busy) begin
      row <= row + 3'd1;
      if (row == 3'(BLK - 1)) busy <= 1'b0;
    end
    if (load) cbuf <= cbuf_nx;
  end

  // horizontal level-1 inverse of the current row, clamp to 8 bits
  always_comb begin
    vec8_t v;
    for (int c = 0; c < BLK; c++) v[c] = cbuf[row][c];
    v = lift53_inv(v, BLK);
    for (int c = 0; c < BLK; c++)
      out_row[c*PIX_W +: PIX_W] = (v[c] < 0) ? 8'd0 : (v[c] > 255) ? 8'd255 : v[c][PIX_W-1:0];
  end
  assign out_valid = busy;

endmodule
