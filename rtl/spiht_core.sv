// 2D SPIHT encoder core: codes one 8x8 block of wavelet coefficients, given
// as bit-planes, into a bitstream of exactly tbl bits (zero padded).
//
// Planes arrive one per cycle: first the sign plane, which starts a block
// and clears all state, then magnitude planes 8 down to 0 (gaps between
// planes are allowed).  The coding order is fixed, which is what makes one
// bit-plane per cycle possible:
//   cycle t   : sorting passes (spiht_sp_pass) of the six non-LL2 bands on the
//               arriving plane; the set states are updated;
//   cycle t+1 : merged refinement passes (spiht_mrp_pass) of all seven bands
//               on that plane, using the new set states, and the first packer
//               stage merges the 20 segments into one word;
//   cycle t+2 : the packer appends the word to the block bitstream.
// A block thus takes 10 plane cycles plus 2 drain cycles; done pulses in the
// cycle after the last append, while bs holds the final bitstream, and bs is
// kept until the next sign plane.  LL2 has no sorting pass: its set is
// significant from the start, so it only has the (merged) refinement pass.
// The pass structure (SP and MRP per band, one plane per cycle, LL2 with one
// pass) follows the FMC design; the set structure, the pipeline split and
// the order of bits inside a plane are this design's choices (see fmc_pkg).
module spiht_core
  import fmc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               plane_valid,
  input  logic               plane_sign,   // this is the sign plane
  input  logic [3:0]         plane_num,    // magnitude plane number 8..0
  input  logic [NCOEF-1:0]   plane,        // bit per coefficient index r*8+c
  input  logic [POS_W-1:0]   tbl,
  output logic               done,
  output logic [TBL_MAX-1:0] bs
);

  // ---------------- state ----------------
  logic [NCOEF-1:0] sign_q;
  logic [NCOEF-1:0] coef_sig;     // coding-index order per band, flattened by coef index
  logic [6:0]       band_sig;
  logic [3:0]       grp_sig [7];  // level-1 bands only (4..6)

  // ---------------- stage 1: sorting passes ----------------
  logic [15:0] bp [7];            // band plane bits in coding order
  logic [4:0]  sp_bits [7];
  logic [2:0]  sp_cnt  [7];
  logic [6:0]  band_sig_nx;
  logic [3:0]  grp_sig_nx [7];

  always_comb
    for (int b = 0; b < 7; b++)
      for (int k = 0; k < 16; k++)
        bp[b][k] = (k < band_size(b)) ? plane[coef_idx(b, k)] : 1'b0;

  assign sp_bits[0] = '0;
  assign sp_cnt[0]  = '0;
  assign band_sig_nx[0] = 1'b1;
  assign grp_sig_nx[0]  = '1;

  for (genvar b = 1; b < 4; b++) begin : g_sp2
    logic g;
    spiht_sp_pass #(.N(4)) u_sp (
      .plane(bp[b][3:0]), .band_sig(band_sig[b]), .grp_sig(band_sig[b]),
      .bits(sp_bits[b]), .cnt(sp_cnt[b]), .band_sig_nx(band_sig_nx[b]), .grp_sig_nx(g));
    assign grp_sig_nx[b] = {4{g}};
  end
  for (genvar b = 4; b < 7; b++) begin : g_sp1
    spiht_sp_pass #(.N(16)) u_sp (
      .plane(bp[b]), .band_sig(band_sig[b]), .grp_sig(grp_sig[b]),
      .bits(sp_bits[b]), .cnt(sp_cnt[b]), .band_sig_nx(band_sig_nx[b]), .grp_sig_nx(grp_sig_nx[b]));
  end

  logic        s1_v, s1_last;
  logic [15:0] s1_bp [7];
  logic [4:0]  s1_sp_bits [7];
  logic [2:0]  s1_sp_cnt  [7];
  wire         mag_in = plane_valid && !plane_sign;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
      s1_last <= 1'b0;
    end else begin
      s1_v <= mag_in;
      s1_last <= mag_in && plane_num == 4'd0;
    end
    if (mag_in) begin
      s1_bp <= bp;
      s1_sp_bits <= sp_bits;
      s1_sp_cnt  <= sp_cnt;
    end
  end

  // ---------------- stage 2: merged refinement passes ----------------
  logic [15:0] sgn_b [7];
  logic [15:0] csig_b [7];
  logic [15:0] m_bits [7], m_sbits [7], m_csig_nx [7], m_new [7];
  logic [4:0]  m_cnt [7], m_scnt [7];

  always_comb
    for (int b = 0; b < 7; b++)
      for (int k = 0; k < 16; k++) begin
        sgn_b[b][k]  = (k < band_size(b)) ? sign_q[coef_idx(b, k)]   : 1'b0;
        csig_b[b][k] = (k < band_size(b)) ? coef_sig[coef_idx(b, k)] : 1'b0;
      end

  for (genvar b = 0; b < 4; b++) begin : g_mrp2
    logic [2:0] c, sc;
    spiht_mrp_pass #(.N(4), .NGRP(1)) u_mrp (
      .plane(s1_bp[b][3:0]), .sign(sgn_b[b][3:0]), .coef_sig(csig_b[b][3:0]),
      .grp_sig(band_sig[b]), .bits(m_bits[b][3:0]), .cnt(c), .sbits(m_sbits[b][3:0]), .scnt(sc),
      .coef_sig_nx(m_csig_nx[b][3:0]), .new_sig(m_new[b][3:0]));
    assign m_bits[b][15:4] = '0;
    assign m_sbits[b][15:4] = '0;
    assign m_csig_nx[b][15:4] = '0;
    assign m_new[b][15:4] = '0;
    assign m_cnt[b]  = 5'(c);
    assign m_scnt[b] = 5'(sc);
  end
  for (genvar b = 4; b < 7; b++) begin : g_mrp1
    spiht_mrp_pass #(.N(16), .NGRP(4)) u_mrp (
      .plane(s1_bp[b]), .sign(sgn_b[b]), .coef_sig(csig_b[b]),
      .grp_sig(grp_sig[b]), .bits(m_bits[b]), .cnt(m_cnt[b]), .sbits(m_sbits[b]), .scnt(m_scnt[b]),
      .coef_sig_nx(m_csig_nx[b]), .new_sig(m_new[b]));
  end

  // segment order: LL2 MRP, {SP, MRP} x 6, 7 sign segments
  logic [SEG_W-1:0] seg_bits [20];
  logic [4:0]       seg_cnt  [20];
  always_comb begin
    seg_bits[0] = m_bits[0];
    seg_cnt[0]  = m_cnt[0];
    for (int b = 1; b < 7; b++) begin
      seg_bits[2*b-1] = SEG_W'(s1_sp_bits[b]);
      seg_cnt[2*b-1]  = 5'(s1_sp_cnt[b]);
      seg_bits[2*b]   = m_bits[b];
      seg_cnt[2*b]    = m_cnt[b];
    end
    for (int b = 0; b < 7; b++) begin
      seg_bits[13+b] = m_sbits[b];
      seg_cnt[13+b]  = m_scnt[b];
    end
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk) begin
    if (!rst_n || (plane_valid && plane_sign)) begin
      coef_sig <= '0;
      band_sig <= 7'b0000001;
      for (int b = 0; b < 7; b++) grp_sig[b] <= (b == 0) ? 4'hf : 4'h0;
    end else begin
      if (mag_in) begin
        band_sig <= band_sig_nx;
        for (int b = 4; b < 7; b++) grp_sig[b] <= grp_sig_nx[b];
      end
      if (s1_v)
        for (int b = 0; b < 7; b++)
          for (int k = 0; k < 16; k++)
            if (k < band_size(b)) coef_sig[coef_idx(b, k)] <= m_csig_nx[b][k];
    end
    if (plane_valid && plane_sign) sign_q <= plane;
  end

  // ---------------- packer ----------------
  logic [POS_W-1:0] bs_len;
  logic             app_valid;
  spiht_packer u_pack (
    .clk, .rst_n, .clear(plane_valid && plane_sign), .in_valid(s1_v), .tbl,
    .seg_bits, .seg_cnt, .bs, .bs_len, .app_valid);

  logic s2_last;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_last <= 1'b0;
      done    <= 1'b0;
    end else begin
      s2_last <= s1_last;
      done    <= s2_last;
    end
  end

endmodule
