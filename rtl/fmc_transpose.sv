// Transpose stage of the FMC encoder: wavelet coefficients in, bit-planes out,
// and the two bit-plane buffers of the dual SPIHT cores.
//
// Pipe time k (load at pc 0): the block's coefficients are written one row
// of 8 per cycle (row pc) into a plane store as sign/magnitude bits: plane 0
// is the sign plane (1 = negative), planes 1..9 are magnitude bits 8..0
// (magnitudes above 511 are saturated).  The store has two banks, one per
// block parity, so the next block can be written while this one is read.
// Pipe time k+1: the upper six planes (sign, 8..4) go straight to core
// (block parity) in cycles 0..5, and the lower four planes (3..0) are copied
// into that core's bit-plane buffer in cycles 0..3.
// Pipe time k+2: the buffer feeds planes 3..0 to the core in cycles 0..3,
// while the other core may be receiving its own upper planes.
// Per-core outputs: plane_valid, plane_sign, plane_num (magnitude plane) and
// the 64 plane bits (index r*8+c).  The split into six direct and four
// buffered planes and the 64x4-bit buffer per core follow the FMC design;
// the row-per-cycle write and the two banks are this design's choices.
module fmc_transpose
  import fmc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       pc,          // cycle inside the pipe time
  input  logic             load,        // at pc 0: transpose the block on coef
  input  coef_t            coef [NCOEF],
  output logic             plane_valid [2],
  output logic             plane_sign  [2],
  output logic [3:0]       plane_num   [2],
  output logic [NCOEF-1:0] plane_bits  [2]
);

  logic [NCOEF-1:0] store [2][NPLANES];

  logic wr_act, wr_bank, rd_act, rd_bank, bf_act, bf_core, next_bank;

  // control: one flag per stage, all moving at the pipe boundary
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_act <= 1'b0; rd_act <= 1'b0; bf_act <= 1'b0;
      wr_bank <= 1'b0; rd_bank <= 1'b0; bf_core <= 1'b0; next_bank <= 1'b0;
    end else begin
      if (pc == 3'd0 && load) begin
        wr_act    <= 1'b1;
        wr_bank   <= next_bank;
        next_bank <= ~next_bank;
      end else if (pc == 3'd7) begin
        wr_act <= 1'b0;
      end
      if (pc == 3'd7) begin
        rd_act  <= wr_act;
        rd_bank <= wr_bank;
        bf_act  <= rd_act;
        bf_core <= rd_bank;
      end
    end
  end

  // write: row pc of the coefficient block into bank wr_bank
  wire wr_now = (pc == 3'd0) ? load : wr_act;
  wire wb     = (pc == 3'd0) ? next_bank : wr_bank;
  always_ff @(posedge clk) begin
    if (wr_now) begin
      for (int c = 0; c < BLK; c++) begin
        coef_t      v;
        logic [8:0] m;
        v = coef[int'(pc) * BLK + c];
        m = (v < 0) ? ((-v > 511) ? 9'd511 : 9'(-v)) : ((v > 511) ? 9'd511 : 9'(v));
        store[wb][0][int'(pc) * BLK + c] <= v[COEF_W-1];
        for (int p = 1; p < NPLANES; p++)
          store[wb][p][int'(pc) * BLK + c] <= m[NPLANES - 1 - p];
      end
    end
  end

  // bit-plane buffers, one per core
  logic [NCOEF-1:0] buf_rdata [2];
  for (genvar k = 0; k < 2; k++) begin : g_buf
    fmc_bitplane_buffer #(.DEPTH(LOWER_PLANES), .WIDTH(NCOEF)) u_buf (
      .clk,
      .we   (rd_act && rd_bank == 1'(k) && pc < 3'(LOWER_PLANES)),
      .waddr(pc[1:0]),
      .wdata(store[k][UPPER_PLANES + int'(pc[1:0])]),
      .raddr(pc[1:0]),
      .rdata(buf_rdata[k]));
  end

  // outputs
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      plane_valid[k] = 1'b0;
      plane_sign[k]  = 1'b0;
      plane_num[k]   = '0;
      plane_bits[k]  = '0;
      if (rd_act && rd_bank == 1'(k) && pc < 3'(UPPER_PLANES)) begin
        plane_valid[k] = 1'b1;
        plane_sign[k]  = (pc == 3'd0);
        plane_num[k]   = 4'(NPLANES - 1) - 4'(pc);
        plane_bits[k]  = store[k][4'(pc)];
      end else if (bf_act && bf_core == 1'(k) && pc < 3'(LOWER_PLANES)) begin
        plane_valid[k] = 1'b1;
        plane_num[k]   = 4'(LOWER_PLANES - 1) - 4'(pc);
        plane_bits[k]  = buf_rdata[k];
      end
    end
  end

endmodule
