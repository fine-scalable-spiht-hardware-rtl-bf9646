// 2D iSPIHT decoder core: rebuilds the 64 wavelet coefficients of one 8x8
// block from its fixed-length bitstream, about one bit-plane per cycle.
//
// start (one cycle) loads the block bitstream and its target length and
// clears the state.  In each of the next 9 cycles ispiht_parser decodes one
// magnitude plane (8 down to 0): set states, the plane bit of every coded
// coefficient and the coefficients that turn significant.  Their sign bits
// are read one cycle later, from the sign segments that follow the plane
// (the sign decoding is delayed by a cycle, as in the FMC design), while the
// next plane is already being parsed -- its address is known because the
// number of sign bits is.  done pulses 11 cycles after start; coef then holds
// the block (sign and magnitude, undecoded low bits zero) until the next
// start.  The coefficient buffer is a register array.  Sign-after-plane
// ordering and zero fill of undecoded bits are this design's choices.
module ispiht_core
  import fmc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [TBL_MAX-1:0] bs_in,
  input  logic [POS_W-1:0]   tbl_in,
  output logic               done,
  output coef_t              coef [NCOEF]
);

  logic [TBL_MAX-1:0] bs;
  logic [POS_W-1:0]   tbl;
  logic [6:0]         band_sig;
  logic [3:0]         grp_sig [7];
  logic [NCOEF-1:0]   coef_sig, neg;
  logic [MAG_W-1:0]   mag [NCOEF];
  logic [10:0]        pos;
  logic [3:0]         n;          // plane being parsed
  logic               run;
  // delayed sign stage
  logic               s_v, s_last;
  logic [NCOEF-1:0]   s_new;
  logic [10:0]        s_pos;

  logic [6:0]         band_sig_nx;
  logic [3:0]         grp_sig_nx [7];
  logic [NCOEF-1:0]   mbit, new_sig;
  logic [10:0]        sign_pos, next_pos;

  ispiht_parser u_parse (
    .bs, .tbl, .pos, .band_sig, .grp_sig, .coef_sig,
    .band_sig_nx, .grp_sig_nx, .mbit, .new_sig, .sign_pos, .next_pos);

  // sign parser: signs of the newly significant coefficients, coding order
  logic [NCOEF-1:0] neg_nx;
  always_comb begin
    logic [10:0] p;
    int          i;
    p = s_pos;
    neg_nx = neg;
    for (int b = 0; b < NBANDS; b++)
      for (int k = 0; k < 16; k++)
        if (k < band_size(b)) begin
          i = coef_idx(b, k);
          if (s_new[i]) begin
            neg_nx[i] = (p < 11'(tbl)) ? bs[p[POS_W-1:0]] : 1'b0;
            p = p + 11'd1;
          end
        end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; s_v <= 1'b0; s_last <= 1'b0; done <= 1'b0;
    end else begin
      done   <= s_v && s_last;
      s_v    <= run;
      s_last <= run && n == 4'd0;
      if (start)                   run <= 1'b1;
      else if (run && n == 4'd0)   run <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      bs       <= bs_in;
      tbl      <= tbl_in;
      band_sig <= 7'b0000001;
      for (int b = 0; b < 7; b++) grp_sig[b] <= '0;
      coef_sig <= '0;
      neg      <= '0;
      for (int i = 0; i < NCOEF; i++) mag[i] <= '0;
      pos      <= '0;
      n        <= 4'(MAG_W - 1);
    end else begin
      if (run) begin
        band_sig <= band_sig_nx;
        grp_sig  <= grp_sig_nx;
        coef_sig <= coef_sig | new_sig;
        for (int i = 0; i < NCOEF; i++) mag[i][n] <= mbit[i];
        pos      <= next_pos;
        n        <= n - 4'd1;
      end
      if (s_v) neg <= neg_nx;
    end
    if (run) begin
      s_new <= new_sig;
      s_pos <= sign_pos;
    end
  end

  always_comb
    for (int i = 0; i < NCOEF; i++)
      coef[i] = neg[i] ? -coef_t'({1'b0, mag[i]}) : coef_t'({1'b0, mag[i]});

endmodule
