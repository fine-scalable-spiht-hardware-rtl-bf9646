// Bitstream parser of the iSPIHT decoder core for one magnitude plane.
//
// Given the decoder state before plane n (set and coefficient significance)
// and the bit address pos where the plane starts, it walks the 13 passes of
// the plane in stream order -- LL2 MRP, then SP and MRP of HL2, LH2, HH2,
// HL1, LH1, HH1 -- and for each pass works out its length from the state and
// the bits already parsed (pre-length calculation), its start address
// (initial address), and extracts its bits.  Results: the new set states,
// the plane bit of every coded coefficient (mbit), the coefficients that
// become significant (new_sig), the address of the sign segments that follow
// (sign_pos) and the address of the next plane (next_pos = sign_pos + number
// of new significant coefficients).  Bits at or past the target length tbl
// read as zero, which is how a truncated stream decodes.  Purely
// combinational.  The FMC design splits this into a pre-length / address
// generator and a parser; here both are one chain of running addresses.
// The state outputs that no pass can change (LL2's band bit and the group
// bits of bands 0..3) are the inputs passed through, so that all seven bands
// share one state format.
module ispiht_parser
  import fmc_pkg::*;
(
  input  logic [TBL_MAX-1:0] bs,
  input  logic [POS_W-1:0]   tbl,
  input  logic [10:0]        pos,
  input  logic [6:0]         band_sig,
  input  logic [3:0]         grp_sig [7],   // level-1 bands 4..6
  input  logic [NCOEF-1:0]   coef_sig,
  output logic [6:0]         band_sig_nx,
  output logic [3:0]         grp_sig_nx [7],
  output logic [NCOEF-1:0]   mbit,
  output logic [NCOEF-1:0]   new_sig,
  output logic [10:0]        sign_pos,
  output logic [10:0]        next_pos
);

  function automatic logic rd(logic [TBL_MAX-1:0] s, logic [POS_W-1:0] t, logic [10:0] p);
    return (p < 11'(t)) ? s[p[POS_W-1:0]] : 1'b0;
  endfunction

  always_comb begin
    logic [10:0] p;
    logic        inset;
    int          i;
    p = pos;
    band_sig_nx = band_sig;
    grp_sig_nx  = grp_sig;
    mbit    = '0;
    new_sig = '0;
    for (int b = 0; b < NBANDS; b++) begin
      // sorting pass
      if (b > 0) begin
        if (!band_sig_nx[b]) begin
          band_sig_nx[b] = rd(bs, tbl, p);
          p = p + 11'd1;
        end
        if (b >= 4 && band_sig_nx[b]) begin
          for (int g = 0; g < 4; g++) begin
            if (!grp_sig_nx[b][g]) begin
              grp_sig_nx[b][g] = rd(bs, tbl, p);
              p = p + 11'd1;
            end
          end
        end
      end
      // merged refinement pass
      for (int k = 0; k < 16; k++) begin
        if (k < band_size(b)) begin
          i = coef_idx(b, k);
          inset = (b >= 4) ? grp_sig_nx[b][k / 4] : band_sig_nx[b];
          if (inset) begin
            mbit[i] = rd(bs, tbl, p);
            p = p + 11'd1;
            if (!coef_sig[i] && mbit[i]) new_sig[i] = 1'b1;
          end
        end
      end
    end
    sign_pos = p;
    next_pos = p + 11'($countones(new_sig));
  end
endmodule
